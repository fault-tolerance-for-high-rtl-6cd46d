// tb_mr_node: random test of one rollback-capable module with two links
// (generalized write buffer, N = 5, M = 3). The testbench plays the core
// (register writes within the write-rate rule, state-register loads, local
// rollback requests, a few of them too deep) and both neighbours (random
// transactions when a link is free, rollback messages in transactions, some
// of which arrive while the module is stalled and must be held). A reference
// model predicts every read, the state register, when a rollback is applied
// and how far, which messages go out on which link with which count, the
// busy flags and the error flag.
module tb_mr_node;
  import mr_pkg::*;
  import mr_model_pkg::*;
  localparam int N = 5, M = 3, NL = 2;
  logic clk = 0, rst_n = 0, tick;
  node_req_t req;
  node_rsp_t rsp;
  logic [NL-1:0] link_xact, rx_valid, tx_valid, busy;
  logic [2:0]    rx_xacts [NL];
  logic [2:0]    tx_xacts [NL];
  int checks = 0, failures = 0;
  int n_local = 0, n_recv = 0, n_fwd = 0, n_held = 0, n_xact = 0, n_err = 0;

  mr_node #(.N(N), .M(M), .FULL(1'b0), .NLINK(NL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  node_model md;
  bit pend [NL];
  int pend_x [NL];
  bit txv [NL];
  int txx [NL];

  initial begin
    md = new(N, M, 1'b0, NL);
    foreach (pend[i]) begin pend[i] = 0; txv[i] = 0; end
    tick = 0; req = '0; link_xact = '0; rx_valid = '0;
    foreach (rx_xacts[i]) rx_xacts[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      bit in_v [NL];
      int in_x [NL];
      bit from [NL];
      int c, cl, ci;
      bit e, lerr, exp_err, apply;
      bit bsy [NL];
      int ctu_x [NL];
      bit ctu_e [NL];
      bit xa [4];
      @(negedge clk);
      tick = $urandom_range(0, 6) != 0;
      req.we = md.write_ok() && $urandom_range(0, 1) == 1;
      req.waddr = AW'($urandom_range(0, 7));
      req.wdata = $urandom;
      req.raddr0 = AW'($urandom_range(0, 7));
      req.raddr1 = AW'($urandom_range(0, 7));
      req.st_load = $urandom_range(0, 2) == 0;
      req.st_d = $urandom;
      req.rb_req = $urandom_range(0, 15) == 0;
      req.rb_cycles = CW'($urandom_range(0, 9) == 0 ? $urandom_range(N + 1, 7) :
                          $urandom_range(1, md.avail > 0 ? md.avail : 1));
      for (int i = 0; i < NL; i++) begin
        int have = 0;
        bit dummy;
        have = md.xacts_in(i, N, dummy);
        rx_valid[i] = !pend[i] && !txv[i] && have > 0 && $urandom_range(0, 19) == 0;
        rx_xacts[i] = 3'($urandom_range(1, have > 0 ? have : 1));
      end
      // model: what this cycle should do
      cl = 0; lerr = 0;
      if (req.rb_req && req.rb_cycles != 0) begin
        lerr = int'(req.rb_cycles) > N;
        cl = lerr ? N : int'(req.rb_cycles);
      end
      c = cl; exp_err = tick && lerr;
      for (int i = 0; i < NL; i++) begin
        in_v[i] = pend[i] || rx_valid[i];
        in_x[i] = pend[i] ? pend_x[i] : int'(rx_xacts[i]);
        from[i] = in_v[i] && in_x[i] != 0;
        if (from[i]) begin
          ci = md.cycles_for(i, in_x[i], e);
          if (tick && e) exp_err = 1;
          if (ci > c) c = ci;
        end
      end
      apply = tick && c != 0;
      for (int i = 0; i < NL; i++) begin
        ctu_x[i] = md.xacts_in(i, c, ctu_e[i]);
        if (apply && !from[i] && ctu_e[i]) exp_err = 1;
        bsy[i] = in_v[i] || txv[i] || apply;
        link_xact[i] = tick && !bsy[i] && $urandom_range(0, 2) == 0;
        xa[i] = link_xact[i];
      end
      #1;
      check("rb_apply", rsp.rb_apply == apply && (!apply || int'(rsp.rb_cycles) == c));
      check("error", rsp.error == exp_err);
      if (md.known[req.raddr0]) check("read0", rsp.rdata0 == md.arch[req.raddr0]);
      if (md.known[req.raddr1]) check("read1", rsp.rdata1 == md.arch[req.raddr1]);
      if (md.st_known) check("state", rsp.st_q == md.st);
      for (int i = 0; i < NL; i++) begin
        check("busy", busy[i] == bsy[i]);
        check("tx", tx_valid[i] == txv[i] && (!txv[i] || int'(tx_xacts[i]) == txx[i]));
      end
      if (exp_err) n_err++;
      if (apply && cl == c && cl != 0) n_local++;
      for (int i = 0; i < NL; i++) begin
        if (apply && from[i]) n_recv++;
        if (rx_valid[i] && !tick) n_held++;
        if (link_xact[i]) n_xact++;
      end
      @(posedge clk);
      for (int i = 0; i < NL; i++) begin
        txv[i] = apply && !from[i] && ctu_x[i] != 0;
        txx[i] = ctu_x[i];
        if (apply && from[i] && (from[0] + from[1] == 1) && txv[i ^ 1]) n_fwd++;
        if (tick) pend[i] = 0;
        else if (rx_valid[i]) begin pend[i] = 1; pend_x[i] = int'(rx_xacts[i]); end
      end
      if (tick) begin
        if (apply) md.rollback(c);
        else md.step(req.we, int'(req.waddr), req.wdata, req.st_load, req.st_d, xa);
      end
    end
    $display("local=%0d received=%0d forwarded=%0d held=%0d transactions=%0d errors=%0d",
             n_local, n_recv, n_fwd, n_held, n_xact, n_err);
    check("local rollbacks", n_local > 0);
    check("received rollbacks", n_recv > 0);
    check("forwarded", n_fwd > 0);
    check("held", n_held > 0);
    check("errors", n_err > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
