// full_dwb: full delayed write buffer (DWB) for a register file that may be
// written every cycle.
//
// Each write enters the newest cell together with its full register
// address. Every cycle all cells move one place toward the register file,
// so a write reaches the oldest cell after N cycles and is then written into
// the real register file (`commit`). Until then it can be undone: a rollback
// of C cycles clears the valid bits of the C newest cells, which returns the
// register-file contents to what they were C cycles ago. Reads scan the
// buffer in parallel with the register file: the address part of the cells
// is a content-addressable memory, and a priority circuit picks the newest
// matching valid cell, so a read always sees the latest write.
//
// This is the scheme of the example design (FIFO of data, CAM of addresses
// with valid bits, priority circuit, two read buses; default 64 registers
// and 4 cells). This design's choices: in a rollback cycle nothing shifts,
// nothing commits and no write is accepted; cell 0 is the newest.
//
// Interface: `tick` is the cycle enable; `rb_cycles` is 1..N. `hit[p]` and
// `hdata[p]` answer read port p combinationally; `commit*` is to be written
// into the register file at the same clock edge.
module full_dwb #(
  parameter int unsigned N  = 4,
  parameter int unsigned AW = 6,
  parameter int unsigned DW = 32,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rb,
  input  logic [CW-1:0] rb_cycles,
  input  logic [AW-1:0] raddr [2],
  output logic          hit   [2],
  output logic [DW-1:0] hdata [2],
  output logic          commit,
  output logic [AW-1:0] commit_addr,
  output logic [DW-1:0] commit_data
);

  logic [N-1:0]  valid;
  logic [AW-1:0] addr [N];
  logic [DW-1:0] data [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (tick) begin
      if (rb) begin
        for (int i = 0; i < N; i++)
          if (i < int'(rb_cycles)) valid[i] <= 1'b0;
      end else begin
        valid <= {valid[N-2:0], we};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (tick && !rb) begin
      for (int i = N - 1; i > 0; i--) begin
        addr[i] <= addr[i-1];
        data[i] <= data[i-1];
      end
      addr[0] <= waddr;
      data[0] <= wdata;
    end
  end

  // Oldest cell leaves the buffer into the register file.
  assign commit      = tick && !rb && valid[N-1];
  assign commit_addr = addr[N-1];
  assign commit_data = data[N-1];

  // CAM match and priority: the newest (lowest index) valid match wins.
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      hit[p]   = 1'b0;
      hdata[p] = '0;
      for (int i = N - 1; i >= 0; i--) begin
        if (valid[i] && addr[i] == raddr[p]) begin
          hit[p]   = 1'b1;
          hdata[p] = data[i];
        end
      end
    end
  end

endmodule
