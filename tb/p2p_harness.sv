// p2p_harness: stimulus and reference checking for the main processor and
// three coprocessors joined by point-to-point links (mr_system), shared by
// the testbench of that block and of the full design.
//
// Phase 1 replays the fan-out example: with transactions placed on the
// three links in the main processor's last four cycles, a local rollback of
// 4 cycles there must send 1, 3 and 2 transactions to coprocessors 0, 1 and
// 2, which must then roll back 2, 6 and 3 of their own cycles (coprocessor 1
// runs on a faster clock than the main processor in this phase).
//
// Phase 2 runs all four modules on random clock-enable patterns with random
// register writes, state loads, transactions and checker-initiated
// rollbacks in every module. A reference model of each module and of the
// link timing predicts every read, state register, rollback, message and
// transaction, and what the main processor's commit buffer releases to a
// peripheral, and the numbered stream from that peripheral, which must reach
// the main processor in order once rollbacks are taken into account; the run
// counts each mechanism and fails if one never occurs.
module p2p_harness
  import mr_pkg::*;
  import mr_model_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic       main_tick,
  output logic [2:0] cop_tick,
  output node_req_t  main_req,
  output node_req_t  cop_req [3],
  output logic [2:0] xact_req,
  output logic       io_valid,
  output logic [31:0] io_data,
  input  node_rsp_t  main_rsp,
  input  node_rsp_t  cop_rsp [3],
  input  logic [2:0] xact_done,
  input  logic [2:0] down_valid,
  input  logic [2:0] down_xacts [3],
  input  logic [2:0] up_valid,
  input  logic [2:0] up_xacts [3],
  input  logic       periph_valid,
  input  logic [31:0] periph_data,
  output logic       pin_valid,
  output logic [31:0] pin_data,
  input  logic       pin_ready,
  input  logic       main_in_valid,
  input  logic [31:0] main_in_data,
  output int         checks,
  output int         failures,
  output logic       done
);
  localparam int NC = 3;
  localparam int NN [4] = '{5, 5, 8, 5};
  localparam int MM [4] = '{5, 3, 2, 3};
  bit iov [5];
  logic [31:0] iod [5];
  int n_periph = 0;
  // peripheral input: numbers 0, 1, 2, ... sent in order; what the main
  // processor took in each of its last 5 cycles; the number it must get next
  bit piv [5];
  int pis [5];
  int pi_sent = 0, pi_next = 0, n_pin = 0, n_replay = 0, n_pheld = 0;
  bit pi_drop = 0;
  int n_local [4], n_recv [4], n_down = 0, n_up = 0, n_fwd = 0, n_held = 0;
  int n_xact = 0, n_block = 0, n_err = 0;

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < 5; i++) begin piv[i] = 0; pis[i] = 0; end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  node_model md [4];
  bit pend [4][3];
  int pend_x [4][3];
  bit txv [4][3];
  int txx [4][3];
  node_req_t rq [4];
  bit tk [4];

  function automatic int nlinks(int k);
    return k == 0 ? 3 : 1;
  endfunction

  // message arriving this clock at node k on its link i
  function automatic bit rxv(int k, int i);
    return k == 0 ? txv[i + 1][0] : txv[0][k - 1];
  endfunction
  function automatic int rxx(int k, int i);
    return k == 0 ? txx[i + 1][0] : txx[0][k - 1];
  endfunction

  // One clock: model, drive transactions, check, advance.
  task automatic run_cycle(output int cyc_out [4], output int down_out [3]);
    bit in_v [4][3];
    int in_x [4][3];
    bit from [4][3];
    int c [4], cl [4];
    bit apply [4], ee [4];
    int ctu_x [4][3];
    bit ctu_e [4][3];
    bit bsy [4][3];
    bit xa [4][4];
    bit e;
    int ci;
    bit rv_s [4][3];
    int rx_s [4][3];
    bit pi_ov, pi_ir;
    logic [31:0] pi_od;
    for (int k = 0; k < 4; k++) begin
      cl[k] = 0; ee[k] = 0;
      if (rq[k].rb_req && rq[k].rb_cycles != 0) begin
        if (int'(rq[k].rb_cycles) > NN[k]) begin cl[k] = NN[k]; ee[k] = tk[k]; end
        else cl[k] = int'(rq[k].rb_cycles);
      end
      c[k] = cl[k];
      for (int i = 0; i < nlinks(k); i++) begin
        in_v[k][i] = pend[k][i] || rxv(k, i);
        in_x[k][i] = pend[k][i] ? pend_x[k][i] : rxx(k, i);
        from[k][i] = in_v[k][i] && in_x[k][i] != 0;
        if (from[k][i]) begin
          ci = md[k].cycles_for(i, in_x[k][i], e);
          if (tk[k] && e) ee[k] = 1;
          if (ci > c[k]) c[k] = ci;
        end
      end
      apply[k] = tk[k] && c[k] != 0;
      for (int i = 0; i < nlinks(k); i++) begin
        ctu_x[k][i] = md[k].xacts_in(i, c[k], ctu_e[k][i]);
        if (apply[k] && !from[k][i] && ctu_e[k][i]) ee[k] = 1;
        bsy[k][i] = in_v[k][i] || txv[k][i] || apply[k];
      end
      cyc_out[k] = apply[k] ? c[k] : 0;
    end
    for (int i = 0; i < NC; i++) begin
      bit d;
      d = xact_req[i] && tk[0] && tk[i + 1] && !bsy[0][i] && !bsy[i + 1][0];
      xa[0][i] = d;
      xa[i + 1][0] = d;
      if (xact_req[i] && tk[0] && tk[i + 1] && !d) n_block++;
      if (d) n_xact++;
    end
    #1;
    for (int i = 0; i < NC; i++) check("xact_done", xact_done[i] == xa[0][i]);
    begin
      bit ep;
      ep = tk[0] && !apply[0] && iov[4];
      check("peripheral", periph_valid == ep && (!ep || periph_data == iod[4]));
      if (ep) n_periph++;
    end
    check("main input only in a normal cycle", !main_in_valid || (tk[0] && !apply[0]));
    check("peripheral ready only in a normal cycle", !pin_ready || (tk[0] && !apply[0]));
    if (main_in_valid) begin
      check("main input in order", main_in_data == 32'(pi_next));
      if (!pin_ready) n_replay++;
    end
    if (tk[0] && !apply[0] && !main_in_valid)
      check("main input idle only when nothing waits", !pin_valid || pin_ready);
    if (pin_valid && tk[0] && !apply[0] && !pin_ready) n_pheld++;
    pi_ov = main_in_valid; pi_od = main_in_data; pi_ir = pin_ready;
    for (int k = 0; k < 4; k++) begin
      node_rsp_t r;
      r = (k == 0) ? main_rsp : cop_rsp[k - 1];
      check("rb_apply", r.rb_apply == apply[k] && (!apply[k] || int'(r.rb_cycles) == c[k]));
      check("error", r.error == ee[k]);
      if (md[k].known[rq[k].raddr0]) check("read0", r.rdata0 == md[k].arch[rq[k].raddr0]);
      if (md[k].known[rq[k].raddr1]) check("read1", r.rdata1 == md[k].arch[rq[k].raddr1]);
      if (md[k].st_known) check("state", r.st_q == md[k].st);
      if (ee[k]) n_err++;
      if (apply[k] && cl[k] == c[k]) n_local[k]++;
      for (int i = 0; i < nlinks(k); i++) begin
        if (apply[k] && from[k][i]) n_recv[k]++;
        if (rxv(k, i) && !tk[k]) n_held++;
      end
    end
    for (int i = 0; i < NC; i++) begin
      check("down", down_valid[i] == txv[0][i] && (!txv[0][i] || int'(down_xacts[i]) == txx[0][i]));
      check("up", up_valid[i] == txv[i + 1][0] && (!txv[i + 1][0] || int'(up_xacts[i]) == txx[i + 1][0]));
      if (down_valid[i]) n_down++;
      if (up_valid[i]) n_up++;
    end
    @(posedge clk);
    // messages on the links before this edge
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < nlinks(k); i++) begin
        rv_s[k][i] = rxv(k, i);
        rx_s[k][i] = rxx(k, i);
      end
    if (tk[0]) begin
      if (apply[0]) begin
        for (int i = 0; i < c[0]; i++) iov[i] = 0;
      end else begin
        for (int i = 4; i > 0; i--) begin iov[i] = iov[i-1]; iod[i] = iod[i-1]; end
        iov[0] = io_valid; iod[0] = io_data;
      end
    end
    if (pin_valid && pi_ir) begin
      n_pin++; pi_sent++; pi_drop = 1;
    end
    if (tk[0]) begin
      if (apply[0]) begin
        int first;
        first = -1;
        for (int i = 4; i >= 0; i--) if (i < c[0] && piv[i] && first < 0) first = pis[i];
        for (int i = 0; i < 5; i++) if (i < c[0]) piv[i] = 0;
        if (first >= 0) pi_next = first;
      end else begin
        for (int i = 4; i > 0; i--) begin piv[i] = piv[i-1]; pis[i] = pis[i-1]; end
        piv[0] = pi_ov; pis[0] = int'(pi_od);
        if (pi_ov) pi_next++;
      end
    end
    for (int k = 0; k < 4; k++) begin
      bit any_from = 0;
      for (int i = 0; i < nlinks(k); i++) any_from |= from[k][i];
      for (int i = 0; i < nlinks(k); i++) begin
        if (tk[k]) pend[k][i] = 0;
        else if (rv_s[k][i]) begin pend[k][i] = 1; pend_x[k][i] = rx_s[k][i]; end
      end
      for (int i = 0; i < nlinks(k); i++) begin
        txv[k][i] = apply[k] && !from[k][i] && ctu_x[k][i] != 0;
        txx[k][i] = ctu_x[k][i];
        if (k == 0 && any_from && txv[k][i]) n_fwd++;
      end
      if (tk[k]) begin
        if (apply[k]) md[k].rollback(c[k]);
        else md[k].step(rq[k].we, int'(rq[k].waddr), rq[k].wdata, rq[k].st_load, rq[k].st_d, xa[k]);
      end
    end
    for (int i = 0; i < NC; i++) down_out[i] = txx[0][i];
  endtask

  task automatic apply_inputs();
    main_tick = tk[0];
    main_req = rq[0];
    for (int i = 0; i < NC; i++) begin
      cop_tick[i] = tk[i + 1];
      cop_req[i] = rq[i + 1];
    end
  endtask

  task automatic quiet(bit t0, bit t1, bit t2, bit t3, logic [2:0] xr);
    for (int k = 0; k < 4; k++) rq[k] = '0;
    tk[0] = t0; tk[1] = t1; tk[2] = t2; tk[3] = t3;
    xact_req = xr;
    io_valid = 0; io_data = '0;
    pin_valid = 0; pin_data = '0;
    apply_inputs();
  endtask

  initial begin
    int cyc [4];
    int dn [3];
    int dn_r [3];
    for (int k = 0; k < 4; k++) begin
      md[k] = new(NN[k], MM[k], k == 0, nlinks(k));
      n_local[k] = 0; n_recv[k] = 0;
      for (int i = 0; i < 3; i++) begin pend[k][i] = 0; txv[k][i] = 0; end
    end
    for (int i = 0; i < 5; i++) iov[i] = 0;
    quiet(0, 0, 0, 0, 3'b000);
    wait (rst_n);

    // ---- phase 1: the fan-out example ----
    for (int t = 0; t < 10; t++) begin @(negedge clk); quiet(1, 1, 1, 1, 3'b000); run_cycle(cyc, dn); end
    @(negedge clk); quiet(1, 1, 1, 1, 3'b010); run_cycle(cyc, dn);   // R-5
    @(negedge clk); quiet(0, 1, 1, 1, 3'b000); run_cycle(cyc, dn);   // R-4, main idle
    @(negedge clk); quiet(1, 1, 1, 1, 3'b010); run_cycle(cyc, dn);   // R-3
    @(negedge clk); quiet(1, 1, 1, 1, 3'b110); run_cycle(cyc, dn);   // R-2
    @(negedge clk); quiet(1, 1, 1, 1, 3'b101); run_cycle(cyc, dn);   // R-1
    @(negedge clk); quiet(1, 1, 1, 1, 3'b000);
    rq[0].rb_req = 1; rq[0].rb_cycles = 4; apply_inputs();
    run_cycle(cyc, dn);                                              // R
    check("example main 4 cycles", cyc[0] == 4);
    check("example transactions 1/3/2", dn[0] == 1 && dn[1] == 3 && dn[2] == 2);
    dn_r = dn;
    @(negedge clk); quiet(1, 1, 1, 1, 3'b000);
    check("example messages", down_valid == 3'b111 && down_xacts[0] == 1 && down_xacts[1] == 3 && down_xacts[2] == 2);
    run_cycle(cyc, dn);                                              // R+1
    check("example coprocessor cycles 2/6/3", cyc[1] == 2 && cyc[2] == 6 && cyc[3] == 3);
    $display("example: main 4 cycles -> %0d/%0d/%0d transactions -> %0d/%0d/%0d cycles",
             dn_r[0], dn_r[1], dn_r[2], cyc[1], cyc[2], cyc[3]);

    // ---- phase 2: random operation ----
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        tk[k] = $urandom_range(0, 9) < (k == 0 ? 9 : 5 + k);
        rq[k].we = md[k].write_ok() && $urandom_range(0, 1) == 1;
        rq[k].waddr = AW'($urandom_range(0, 7));
        rq[k].wdata = $urandom;
        rq[k].raddr0 = AW'($urandom_range(0, 7));
        rq[k].raddr1 = AW'($urandom_range(0, 63));
        rq[k].st_load = $urandom_range(0, 2) == 0;
        rq[k].st_d = $urandom;
        rq[k].rb_req = $urandom_range(0, 24) == 0;
        rq[k].rb_cycles = CW'($urandom_range(0, 19) == 0 ? NN[k] + 1 : $urandom_range(1, NN[k]));
      end
      xact_req = 3'($urandom_range(0, 7));
      io_valid = $urandom_range(0, 1) == 1;
      io_data = $urandom;
      if (pi_drop) pin_valid = 0;
      pi_drop = 0;
      if (!pin_valid) pin_valid = $urandom_range(0, 2) != 0;
      pin_data = 32'(pi_sent);
      apply_inputs();
      run_cycle(cyc, dn);
    end

    $display("local rollbacks main/cop0/cop1/cop2 = %0d/%0d/%0d/%0d", n_local[0], n_local[1], n_local[2], n_local[3]);
    $display("received rollbacks main/cop0/cop1/cop2 = %0d/%0d/%0d/%0d", n_recv[0], n_recv[1], n_recv[2], n_recv[3]);
    $display("messages down=%0d up=%0d forwarded=%0d held=%0d; transactions=%0d blocked=%0d; errors=%0d",
             n_down, n_up, n_fwd, n_held, n_xact, n_block, n_err);
    $display("committed peripheral writes=%0d", n_periph);
    $display("peripheral inputs taken=%0d replayed=%0d peripheral held=%0d", n_pin, n_replay, n_pheld);
    for (int k = 0; k < 4; k++) begin
      check("local rollback seen", n_local[k] > 0);
      check("received rollback seen", n_recv[k] > 0);
    end
    check("down messages", n_down > 0);
    check("up messages", n_up > 0);
    check("forwarded", n_fwd > 0);
    check("held", n_held > 0);
    check("transactions", n_xact > 0);
    check("blocked", n_block > 0);
    check("errors", n_err > 0);
    check("peripheral releases", n_periph > 0);
    check("peripheral inputs taken", n_pin > 0);
    check("peripheral inputs replayed", n_replay > 0);
    check("peripheral held during replay", n_pheld > 0);
    done = 1;
  end
endmodule
