// regfile: conventional register file with two read ports (bus 1 and bus
// 2) and one write port, the "real" register file that a delayed write
// buffer writes into once a write can no longer be rolled back.
//
// Reads are combinational; a write takes effect at the clock edge. The
// register count and width default to the 64 x 32-bit file of the example
// processor; having no reset is this design's choice (the contents are
// architectural state that software initialises).
module regfile #(
  parameter int unsigned NREG = 64,
  parameter int unsigned DW   = 32,
  localparam int unsigned AW  = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr0,
  input  logic [AW-1:0] raddr1,
  output logic [DW-1:0] rdata0,
  output logic [DW-1:0] rdata1
);

  logic [DW-1:0] mem [NREG];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];

endmodule
