// tb_rb_regfile: random test of the 64 x 32-bit register file with a full
// four-cell delayed write buffer. The reference is the architectural
// register contents plus an undo log of the last N cycles (which register
// each cycle wrote and its value before). Every cycle both read ports must
// show the architectural contents, whether the latest value still sits in
// the buffer or has reached the register file; a rollback of C cycles must
// undo exactly the writes of the last C cycles.
module tb_rb_regfile;
  localparam int NREG = 64, DW = 32, N = 4;
  logic clk = 0, rst_n = 0, tick, we, rb, error;
  logic [5:0]    waddr, raddr0, raddr1;
  logic [DW-1:0] wdata, rdata0, rdata1;
  logic [2:0]    rb_cycles;
  int checks = 0, failures = 0, rbs = 0;
  logic armed = 1'b0;  // all registers written once

  logic [DW-1:0] arch [NREG];
  logic          uv [N];
  logic [5:0]    ua [N];
  logic [DW-1:0] uo [N];

  rb_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic t, logic w, logic [5:0] a, logic [DW-1:0] v, logic r, int c);
    @(negedge clk);
    tick = t; we = w; waddr = a; wdata = v; rb = r; rb_cycles = 3'(c);
    raddr0 = 6'($urandom_range(0, NREG - 1));
    raddr1 = 6'($urandom_range(0, 7));
    #1;
    if (armed) begin
      checks += 2;
      if (rdata0 !== arch[raddr0]) begin
        failures++;
        if (failures < 10) $display("FAIL r0 %0d: %h exp %h at %0t", raddr0, rdata0, arch[raddr0], $time);
      end
      if (rdata1 !== arch[raddr1]) begin
        failures++;
        if (failures < 10) $display("FAIL r1 %0d: %h exp %h at %0t", raddr1, rdata1, arch[raddr1], $time);
      end
    end
    @(posedge clk);
    if (t) begin
      if (r) begin
        rbs++;
        for (int k = 0; k < N; k++)
          if (k < c && uv[k]) begin arch[ua[k]] = uo[k]; uv[k] = 1'b0; end
      end else begin
        for (int k = N - 1; k > 0; k--) begin uv[k] = uv[k-1]; ua[k] = ua[k-1]; uo[k] = uo[k-1]; end
        uv[0] = w; ua[0] = a; uo[0] = arch[a];
        if (w) arch[a] = v;
      end
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) uv[k] = 1'b0;
    tick = 0; we = 0; rb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NREG; i++) step(1, 1, 6'(i), $urandom, 0, 0);
    armed = 1'b1;
    for (int i = 0; i < N; i++) step(1, 0, 0, 0, 0, 0);
    // the writes of the first phase are now committed: their undo entries are gone
    for (int cyc = 0; cyc < 4000; cyc++)
      step($urandom_range(0, 9) != 0, $urandom_range(0, 1) == 1, 6'($urandom_range(0, 7)),
           $urandom, $urandom_range(0, 6) == 0, $urandom_range(1, N));
    checks++;
    if (rbs < 300 || error) failures++;
    $display("rollbacks=%0d", rbs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
