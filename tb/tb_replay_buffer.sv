// tb_replay_buffer: random test of the input interface to a module that
// rolls back (N = 5).
//
// The sender offers the numbers 0, 1, 2, ... in order, at random times.
// The receiver is modelled by what it keeps: the items it took in each of
// its last N enabled cycles. A rollback of C cycles forgets what it took in
// the last C, so the next item it must be handed is the earliest of those.
// The test checks every hand-over against that expectation: nothing is
// lost, duplicated or reordered from the receiver's point of view, and the
// sender sees each number accepted exactly once, in order. It also checks
// that the interface holds the sender off while replaying, and that a
// replay starts in the first cycle after the rollback.
module tb_replay_buffer;
  localparam int N = 5, DW = 32;
  logic clk = 0, rst_n = 0;
  logic tick, in_valid, in_ready, rb, out_valid;
  logic [DW-1:0] in_data, out_data;
  logic [2:0] rb_cycles;
  int checks = 0, failures = 0;
  int sent, expect_next, replays, rbs, accepted, held;
  logic        kv [N];
  int          ks [N];
  logic        pend_replay, ov_s, ir_s, drop;
  logic [DW-1:0] od_s;

  replay_buffer #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    sent = 0; expect_next = 0; replays = 0; rbs = 0; accepted = 0; held = 0;
    pend_replay = 0; drop = 0;
    for (int k = 0; k < N; k++) begin kv[k] = 0; ks[k] = 0; end
    tick = 0; in_valid = 0; in_data = 0; rb = 0; rb_cycles = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      if (drop) in_valid = 0;
      drop = 0;
      tick = $urandom_range(0, 7) != 0;
      rb   = $urandom_range(0, 9) == 0;
      rb_cycles = 3'($urandom_range(1, N));
      if (!in_valid) in_valid = $urandom_range(0, 2) != 0;
      in_data = DW'(sent);
      #1;
      check("ready only when enabled", !in_ready || (tick && !rb));
      check("no hand-over when disabled or rolling back", !out_valid || (tick && !rb));
      if (tick && !rb && pend_replay) begin
        check("replay starts at once", out_valid && !in_ready);
        pend_replay = 0;
      end
      if (out_valid) begin
        check("hand-over in order", out_data == DW'(expect_next));
        if (out_data != DW'(sent) || !in_ready) replays++;
      end
      if (in_valid && tick && !rb && !in_ready) held++;
      if (tick && !rb && !out_valid) check("idle only when nothing waits", !in_valid || in_ready);
      ov_s = out_valid; od_s = out_data; ir_s = in_ready;
      @(posedge clk);
      if (in_valid && ir_s) begin
        accepted++;
        sent++;
        drop = 1;
      end
      if (tick) begin
        if (rb) begin
          int first;
          rbs++;
          first = -1;
          for (int k = N - 1; k >= 0; k--)
            if (k < int'(rb_cycles) && kv[k] && first < 0) first = ks[k];
          for (int k = 0; k < N; k++) if (k < int'(rb_cycles)) kv[k] = 0;
          if (first >= 0) begin
            expect_next = first;
            pend_replay = 1;
          end
        end else begin
          for (int k = N - 1; k > 0; k--) begin kv[k] = kv[k-1]; ks[k] = ks[k-1]; end
          kv[0] = ov_s;
          ks[0] = int'(od_s);
          if (ov_s) expect_next++;
        end
      end
    end
    check("sender numbers match hand-overs", expect_next <= sent);
    check("rollbacks seen", rbs > 200);
    check("replays seen", replays > 200);
    check("sender held off", held > 50);
    check("items accepted", accepted > 1000);
    $display("accepted=%0d rollbacks=%0d replayed=%0d held=%0d", accepted, rbs, replays, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
