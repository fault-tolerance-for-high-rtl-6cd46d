// bus_harness: stimulus and reference checking for the bus-connected
// system (mr_bus_system: processor, MMU, FPU, FFT), shared by the testbench
// of that block and of the full design.
//
// All four modules run on random clock-enable patterns with random register
// writes, state loads and checker-initiated rollbacks; bus transactions are
// requested between random pairs of modules. A reference model of each
// module (register contents, state history, cycle monitor and bus monitor)
// and of the announcement register predicts every read, state register,
// rollback and its depth, announcement, bus transaction and error flag. The
// run counts local rollbacks, announcements, modules that rolled back on an
// announcement and modules that did not need to, held announcements and
// blocked bus transactions, and fails if one never occurs.
module bus_harness
  import mr_pkg::*;
  import mr_model_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic [3:0] tick,
  output node_req_t  req [4],
  output logic       bus_req,
  output logic [3:0] bus_parts,
  input  node_rsp_t  rsp [4],
  input  logic       bus_done,
  input  logic       bcast_valid,
  input  logic [2:0] bcast_g,
  input  logic [1:0] bcast_src,
  output int         checks,
  output int         failures,
  output logic       done
);
  localparam int N = 5, NB = 5;
  node_model md [4];
  bit pend [4];
  int pend_g [4];
  bit bv;
  int bg, bs;
  int n_local = 0, n_ann = 0, n_follow = 0, n_spared = 0, n_held = 0;
  int n_bus = 0, n_block = 0, n_err = 0;

  initial begin checks = 0; failures = 0; done = 0; end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL bus %s at %0t", what, $time);
    end
  endtask

  task automatic run_cycle();
    bit in_v [4], apply [4], txv [4], ee [4], rxv;
    int in_g [4], c [4], txg [4], rbg [4];
    bit any_busy, bd;
    any_busy = bv;
    for (int k = 0; k < 4; k++) begin
      rxv = bv && bs != k;
      in_v[k] = pend[k] || rxv;
      in_g[k] = pend[k] ? pend_g[k] : (rxv ? bg : 0);
      md[k].bus_plan(tick[k], req[k].rb_req, int'(req[k].rb_cycles), in_v[k], in_g[k],
                     c[k], apply[k], txv[k], txg[k], rbg[k], ee[k]);
      any_busy |= in_v[k] || apply[k];
    end
    bd = bus_req && (&tick) && !any_busy;
    if (bus_req && (&tick) && !bd) n_block++;
    if (bd) n_bus++;
    #1;
    check("bus_done", bus_done == bd);
    check("bcast", bcast_valid == bv && (!bv || (int'(bcast_g) == bg && int'(bcast_src) == bs)));
    for (int k = 0; k < 4; k++) begin
      check("rb_apply", rsp[k].rb_apply == apply[k] && (!apply[k] || int'(rsp[k].rb_cycles) == c[k]));
      check("error", rsp[k].error == ee[k]);
      if (md[k].known[req[k].raddr0]) check("read0", rsp[k].rdata0 == md[k].arch[req[k].raddr0]);
      if (md[k].known[req[k].raddr1]) check("read1", rsp[k].rdata1 == md[k].arch[req[k].raddr1]);
      if (md[k].st_known) check("state", rsp[k].st_q == md[k].st);
      if (ee[k]) n_err++;
      if (txv[k]) n_local++;
      if (tick[k] && in_v[k]) begin
        if (apply[k] && !(req[k].rb_req && req[k].rb_cycles != 0)) n_follow++;
        if (!apply[k]) n_spared++;
      end
      if (bv && bs != k && !tick[k]) n_held++;
    end
    if (bv) n_ann++;
    @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      rxv = bv && bs != k;
      if (tick[k]) pend[k] = 0;
      else if (rxv) begin pend[k] = 1; pend_g[k] = bg; end
    end
    bv = 0;
    for (int k = 0; k < 4; k++)
      if (txv[k] && (!bv || txg[k] > bg)) begin bv = 1; bg = txg[k]; bs = k; end
    for (int k = 0; k < 4; k++) begin
      if (tick[k]) begin
        if (apply[k]) begin
          md[k].rollback(c[k]);
          if (rbg[k] != 0) md[k].bus_clear(rbg[k]);
        end else begin
          bit xa [4];
          xa[0] = bd && bus_parts[k];
          md[k].step(req[k].we, int'(req[k].waddr), req[k].wdata, req[k].st_load, req[k].st_d, xa);
          if (bd) md[k].bus_shift(bus_parts[k]);
        end
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      md[k] = new(N, k == 0 ? N : 3, k == 0, 1);
      md[k].nb = NB;
      pend[k] = 0;
      req[k] = '0;
    end
    bv = 0; bg = 0; bs = 0;
    tick = '0; bus_req = 0; bus_parts = '0;
    wait (rst_n);
    for (int t = 0; t < 8000; t++) begin
      int a, b;
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        tick[k] = $urandom_range(0, 19) != 0;
        req[k].we = md[k].write_ok() && $urandom_range(0, 1) == 1;
        req[k].waddr = AW'($urandom_range(0, 7));
        req[k].wdata = $urandom;
        req[k].raddr0 = AW'($urandom_range(0, 7));
        req[k].raddr1 = AW'($urandom_range(0, 63));
        req[k].st_load = $urandom_range(0, 2) == 0;
        req[k].st_d = $urandom;
        req[k].rb_req = $urandom_range(0, 29) == 0;
        req[k].rb_cycles = CW'($urandom_range(0, 19) == 0 ? N + 1 : $urandom_range(1, N));
      end
      bus_req = $urandom_range(0, 4) != 0;
      a = $urandom_range(0, 3);
      b = $urandom_range(0, 3);
      bus_parts = '0;
      bus_parts[a] = 1'b1;
      bus_parts[b] = 1'b1;
      run_cycle();
    end
    $display("bus: local=%0d announcements=%0d followed=%0d spared=%0d held=%0d transactions=%0d blocked=%0d errors=%0d",
             n_local, n_ann, n_follow, n_spared, n_held, n_bus, n_block, n_err);
    check("local rollbacks", n_local > 0);
    check("announcements", n_ann > 0);
    check("followed", n_follow > 0);
    check("spared", n_spared > 0);
    check("held", n_held > 0);
    check("bus transactions", n_bus > 0);
    check("blocked", n_block > 0);
    check("errors", n_err > 0);
    done = 1;
  end
endmodule
