// rb_regfile: register file with micro rollback.
//
// A conventional two-read, one-write register file is paired with a delayed
// write buffer. Writes go into the buffer and reach the register file only
// after N cycles, when no rollback can undo them any more; reads consult the
// buffer in parallel with the register file and take the buffer's newest
// matching value when there is one. A rollback of C cycles invalidates the
// buffered writes of the last C cycles, so the visible register contents are
// those of C cycles ago, in one cycle.
//
// FULL = 1 selects the full buffer (one cell per cycle, for modules that may
// write every cycle); FULL = 0 selects the buffer for infrequently modified
// registers with M cells. Defaults (64 x 32 bits, 4 cells, full buffer) are
// the example processor's; M and the parameter FULL are this design's.
//
// Interface: `tick` is the cycle enable; `rb_cycles` is 1..N and `rb`
// suppresses the write of its cycle. Reads are combinational. `error` is
// the buffer's checker output (always 0 for the full buffer).
module rb_regfile #(
  parameter int unsigned NREG = 64,
  parameter int unsigned DW   = 32,
  parameter int unsigned N    = 4,
  parameter int unsigned M    = 4,
  parameter bit          FULL = 1'b1,
  localparam int unsigned AW  = $clog2(NREG),
  localparam int unsigned CW  = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr0,
  input  logic [AW-1:0] raddr1,
  output logic [DW-1:0] rdata0,
  output logic [DW-1:0] rdata1,
  input  logic          rb,
  input  logic [CW-1:0] rb_cycles,
  output logic          error
);

  logic [AW-1:0] raddr [2];
  logic          hit   [2];
  logic [DW-1:0] hdata [2];
  logic          commit;
  logic [AW-1:0] commit_addr;
  logic [DW-1:0] commit_data;
  logic [DW-1:0] rf0, rf1;

  assign raddr[0] = raddr0;
  assign raddr[1] = raddr1;

  if (FULL) begin : g_full
    full_dwb #(.N(N), .AW(AW), .DW(DW)) u_dwb (
      .clk, .rst_n, .tick, .we, .waddr, .wdata, .rb, .rb_cycles,
      .raddr, .hit, .hdata, .commit, .commit_addr, .commit_data
    );
    assign error = 1'b0;
  end else begin : g_gen
    gen_dwb #(.N(N), .M(M), .AW(AW), .DW(DW)) u_dwb (
      .clk, .rst_n, .tick, .we, .waddr, .wdata, .rb, .rb_cycles,
      .raddr, .hit, .hdata, .commit, .commit_addr, .commit_data, .error
    );
  end

  regfile #(.NREG(NREG), .DW(DW)) u_rf (
    .clk, .we(commit), .waddr(commit_addr), .wdata(commit_data),
    .raddr0, .raddr1, .rdata0(rf0), .rdata1(rf1)
  );

  assign rdata0 = hit[0] ? hdata[0] : rf0;
  assign rdata1 = hit[1] ? hdata[1] : rf1;

endmodule
