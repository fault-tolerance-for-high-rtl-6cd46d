// tb_commit_buffer: random test of the commit interface (N = 5). Each item
// must be released exactly N enabled cycles after it was emitted, unless a
// rollback of C cycles taken before then covered the cycle it was emitted
// in; nothing else may be released.
module tb_commit_buffer;
  localparam int N = 5, DW = 32;
  logic clk = 0, rst_n = 0, tick, in_valid, rb, out_valid;
  logic [DW-1:0] in_data, out_data;
  logic [2:0] rb_cycles;
  int checks = 0, failures = 0, outs = 0, rbs = 0;
  logic          lv [N];
  logic [DW-1:0] ld [N];

  commit_buffer #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) lv[k] = 1'b0;
    tick = 0; in_valid = 0; rb = 0; rb_cycles = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic ev;
      @(negedge clk);
      tick = $urandom_range(0, 9) != 0;
      in_valid = $urandom_range(0, 1) == 1;
      in_data = $urandom;
      rb = $urandom_range(0, 6) == 0;
      rb_cycles = 3'($urandom_range(1, N));
      #1;
      ev = tick && !rb && lv[N-1];
      checks++;
      if (out_valid !== ev || (ev && out_data !== ld[N-1])) begin
        failures++;
        if (failures < 10) $display("FAIL out %b/%h exp %b/%h", out_valid, out_data, ev, ld[N-1]);
      end
      if (ev) outs++;
      @(posedge clk);
      if (tick) begin
        if (rb) begin
          rbs++;
          for (int k = 0; k < N; k++) if (k < int'(rb_cycles)) lv[k] = 1'b0;
        end else begin
          for (int k = N - 1; k > 0; k--) begin lv[k] = lv[k-1]; ld[k] = ld[k-1]; end
          lv[0] = in_valid; ld[0] = in_data;
        end
      end
    end
    checks++;
    if (outs < 300 || rbs < 200) failures++;
    $display("released=%0d rollbacks=%0d", outs, rbs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
