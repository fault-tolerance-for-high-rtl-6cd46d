// tb_shadow_reg: random test of a 32-bit state register with four shadow
// registers. A reference list of the values the register held in the cycles
// before the present one is kept by depth; a rollback of C cycles must bring
// back the value of C cycles ago in one cycle, and after it the list is the
// one of C cycles ago. Rollbacks only go as deep as the shadow registers
// still hold. Loads, holds, stalls and all rollback distances are mixed; the
// parity checker must stay quiet.
module tb_shadow_reg;
  localparam int W = 32, N = 4;
  logic clk = 0, rst_n = 0, tick, load, rb, parity_err;
  logic [W-1:0] d, q;
  logic [2:0]   rb_cycles;
  int checks = 0, failures = 0, rbs = 0;
  logic [W-1:0] hist [N + 1];
  logic [W-1:0] qe;
  int avail;

  shadow_reg #(.W(W), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick = 0; load = 0; rb = 0; rb_cycles = 0; d = 0;
    qe = '0; avail = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      checks++;
      if (q !== qe || parity_err) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h exp %h perr=%b at %0t", q, qe, parity_err, $time);
      end
      tick = $urandom_range(0, 9) != 0;
      load = $urandom_range(0, 1) == 1;
      d    = $urandom;
      rb   = avail > 0 && $urandom_range(0, 5) == 0;
      rb_cycles = 3'($urandom_range(1, avail > 0 ? avail : 1));
      @(posedge clk);
      if (tick) begin
        if (rb) begin
          rbs++;
          qe = hist[rb_cycles];
          for (int k = 1; k <= N; k++)
            if (k + int'(rb_cycles) <= N) hist[k] = hist[k + int'(rb_cycles)];
          avail -= int'(rb_cycles);
        end else begin
          for (int k = N; k > 1; k--) hist[k] = hist[k-1];
          hist[1] = qe;
          if (avail < N) avail++;
          if (load) qe = d;
        end
      end
    end
    checks++;
    if (rbs < 200) failures++;
    $display("rollbacks=%0d", rbs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
