// dwb_grid_cell: test harness for one delayed write buffer size, used by
// tb_dwb_table1 to run every size of the area table (N cycles, M cells).
//
// FULL = 1 selects the full buffer (one cell per cycle), otherwise the
// buffer for infrequently modified registers with M cells. The harness
// drives random writes (never more than M in any N consecutive enabled
// cycles), rollbacks of every distance 1..N, disabled cycles and two reads
// per cycle, and compares against a reference log of the last N cycles: a
// write leaves for the register file exactly N enabled cycles after it was
// made unless a rollback covering it came first, and a read returns the
// newest buffered write to its address. For the M-cell buffer it ends by
// writing in M+1 consecutive cycles, which must raise the error output.
//
// Outputs: running check and failure counts, and `done` after CYCLES
// cycles plus the final checks.
module dwb_grid_cell #(
  parameter int unsigned N      = 5,
  parameter int unsigned M      = 3,
  parameter bit          FULL   = 1'b0,
  parameter int unsigned CYCLES = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int AW = 6, DW = 32, CW = $clog2(N + 1);
  logic tick, we, rb;
  logic [AW-1:0] waddr, commit_addr;
  logic [DW-1:0] wdata, commit_data;
  logic [CW-1:0] rb_cycles;
  logic [AW-1:0] raddr [2];
  logic          hit [2];
  logic [DW-1:0] hdata [2];
  logic          commit, error;
  int            inlog, commits, rbs, hits;

  logic          lv [N];
  logic [AW-1:0] la [N];
  logic [DW-1:0] ld [N];

  if (FULL) begin : g_full
    full_dwb #(.N(N), .AW(AW), .DW(DW)) dut (
      .clk, .rst_n, .tick, .we, .waddr, .wdata, .rb, .rb_cycles, .raddr,
      .hit, .hdata, .commit, .commit_addr, .commit_data
    );
    assign error = 1'b0;
  end else begin : g_gen
    gen_dwb #(.N(N), .M(M), .AW(AW), .DW(DW)) dut (
      .clk, .rst_n, .tick, .we, .waddr, .wdata, .rb, .rb_cycles, .raddr,
      .hit, .hdata, .commit, .commit_addr, .commit_data, .error
    );
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d M=%0d FULL=%0d %s at %0t", N, M, FULL, what, $time);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0; commits = 0; rbs = 0; hits = 0;
    for (int k = 0; k < int'(N); k++) lv[k] = 1'b0;
    tick = 0; we = 0; rb = 0; rb_cycles = 0; waddr = 0; wdata = 0;
    raddr[0] = 0; raddr[1] = 0;
    wait (rst_n);
    for (int cyc = 0; cyc < int'(CYCLES); cyc++) begin
      @(negedge clk);
      tick      = ($urandom_range(0, 9) != 0);
      rb        = ($urandom_range(0, 7) == 0);
      rb_cycles = CW'($urandom_range(1, N));
      inlog = 0;
      for (int k = 0; k < int'(N) - 1; k++) inlog += int'(lv[k]);
      we        = ($urandom_range(0, 2) != 0) && (rb || inlog < int'(M));
      waddr     = AW'($urandom_range(0, 7));
      wdata     = $urandom;
      raddr[0]  = AW'($urandom_range(0, 8));
      raddr[1]  = AW'($urandom_range(0, 8));
      #1;
      for (int p = 0; p < 2; p++) begin
        logic eh;
        logic [DW-1:0] ed;
        eh = 1'b0; ed = '0;
        for (int k = int'(N) - 1; k >= 0; k--)
          if (lv[k] && la[k] == raddr[p]) begin eh = 1'b1; ed = ld[k]; end
        check("read", hit[p] == eh && (!eh || hdata[p] == ed));
        if (eh) hits++;
      end
      check("no error", error == 1'b0);
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
          for (int k = 0; k < int'(N); k++) if (k < int'(rb_cycles)) lv[k] = 1'b0;
        end else begin
          for (int k = int'(N) - 1; k > 0; k--) begin lv[k] = lv[k-1]; la[k] = la[k-1]; ld[k] = ld[k-1]; end
          lv[0] = we; la[0] = waddr; ld[0] = wdata;
        end
      end
    end
    if (!FULL && M < N) begin
      @(negedge clk);
      tick = 1; rb = 0; we = 1;
      for (int i = 0; i < int'(M); i++) @(negedge clk);
      #1;
      check("overflow flagged", error == 1'b1);
    end
    @(negedge clk);
    tick = 0; we = 0;
    check("commits seen", commits > int'(CYCLES) / 30);
    check("rollbacks seen", rbs > int'(CYCLES) / 30);
    check("hits seen", hits > int'(CYCLES) / 30);
    $display("N=%0d M=%0d %s: commits=%0d rollbacks=%0d hits=%0d failures=%0d",
             N, M, FULL ? "full" : "gen ", commits, rbs, hits, failures);
    done = 1'b1;
  end
endmodule
