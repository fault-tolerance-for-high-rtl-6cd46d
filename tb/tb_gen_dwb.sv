// tb_gen_dwb: random test of the delayed write buffer for infrequently modified
// registers (N = 5 cycles, M = 3 cells, 64 x 32). A reference log of the last N cycles
// (write or no write in each) gives what must leave the buffer and when: a
// write is committed exactly N
// enabled cycles after it was made unless a rollback covering its cycle
// came first. Reads must return the newest buffered write to the address.
// Rollbacks of every distance 1..N, stalled cycles and idle cycles are mixed.
module tb_gen_dwb;
  localparam int N = 5, M = 3, AW = 6, DW = 32;
  logic clk = 0, rst_n = 0, tick, we, rb;
  logic [AW-1:0] waddr, commit_addr;
  logic [DW-1:0] wdata, commit_data;
  logic [2:0]    rb_cycles;
  logic [AW-1:0] raddr [2];
  logic          hit [2];
  logic [DW-1:0] hdata [2];
  logic          commit, error;
  int            inlog;
  int checks = 0, failures = 0, commits = 0, rbs = 0, hits = 0;

  logic          lv [N];
  logic [AW-1:0] la [N];
  logic [DW-1:0] ld [N];

  gen_dwb #(.N(N), .M(M), .AW(AW), .DW(DW)) dut (.*);

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
    for (int k = 0; k < N; k++) lv[k] = 1'b0;
    tick = 0; we = 0; rb = 0; rb_cycles = 0; waddr = 0; wdata = 0;
    raddr[0] = 0; raddr[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      tick      = ($urandom_range(0, 9) != 0);
      rb        = ($urandom_range(0, 7) == 0);
      rb_cycles = 3'($urandom_range(1, N));
      inlog = 0;
      for (int k = 0; k < N - 1; k++) inlog += int'(lv[k]);
      we        = ($urandom_range(0, 2) != 0) && (rb || inlog < M);
      waddr     = AW'($urandom_range(0, 7));
      wdata     = $urandom;
      raddr[0]  = AW'($urandom_range(0, 8));
      raddr[1]  = AW'($urandom_range(0, 8));
      #1;
      // reads: newest valid write to the address
      for (int p = 0; p < 2; p++) begin
        logic eh;
        logic [DW-1:0] ed;
        eh = 1'b0; ed = '0;
        for (int k = N - 1; k >= 0; k--)
          if (lv[k] && la[k] == raddr[p]) begin eh = 1'b1; ed = ld[k]; end
        check("read", hit[p] == eh && (!eh || hdata[p] == ed));
        if (eh) hits++;
      end
      check("no error", error == 1'b0);
      // commit: the write made N enabled cycles ago, if still valid
      begin
        logic ec;
        ec = tick && !rb && lv[N-1];
        check("commit", commit == ec && (!ec || (commit_addr == la[N-1] && commit_data == ld[N-1])));
        if (ec) commits++;
      end
      @(posedge clk);
      if (tick) begin
        if (rb) begin
          rbs++;
          for (int k = 0; k < N; k++) if (k < int'(rb_cycles)) lv[k] = 1'b0;
        end else begin
          for (int k = N - 1; k > 0; k--) begin lv[k] = lv[k-1]; la[k] = la[k-1]; ld[k] = ld[k-1]; end
          lv[0] = we; la[0] = waddr; ld[0] = wdata;
        end
      end
    end
    // a fourth write within five cycles must be flagged
    @(negedge clk);
    tick = 1; rb = 0; we = 1;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
    end
    #1;
    check("overflow flagged", error == 1'b1);
    @(negedge clk);
    we = 0;
    check("commits seen", commits > 100);
    check("rollbacks seen", rbs > 100);
    check("hits seen", hits > 100);
    $display("commits=%0d rollbacks=%0d hits=%0d", commits, rbs, hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
