// mr_bus_system: a processor, an MMU, an FPU and an FFT unit sharing one
// system bus, each able to roll back a few of its own cycles.
//
// Each module sees every bus transaction and records which ones were its
// own. A module whose checker fires rolls back and announces on the bus the
// number of bus transactions its rollback covers; the announcement is
// registered and reaches every other module the next clock. Each of them
// rolls back only as far as its own part in those transactions requires,
// often not at all, so no rollback can bounce between modules.
//
// If several modules announce in the same clock, the largest count is
// carried (lowest module number on a tie) and every module but its sender
// receives it. No bus transaction may take place while an announcement is in
// flight, held by a module, or being applied. A bus transaction takes place
// only in a clock in which every module is enabled.
//
// Module 0 (processor) has a full write buffer; modules 1-3 (MMU, FPU, FFT)
// the buffer for infrequently modified registers. Module names follow the
// example bus system; the memory on that bus has no rollback and is outside
// this block. Sizes, the announcement timing and the arbitration rule are
// this design's choices.
//
// Interface: `bus_req` asks for a bus transaction between the modules set
// in `bus_parts`; `bus_done` says it took place. `bcast_*` shows the
// announcement on the bus.
module mr_bus_system
  import mr_pkg::*;
#(
  parameter int unsigned N    = 5,
  parameter int unsigned M    = 3,
  parameter int unsigned NB   = 5,
  parameter int unsigned TMAX = 4,
  localparam int unsigned K   = 4,
  localparam int unsigned GW  = $clog2(NB + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [K-1:0]   tick,
  input  node_req_t      req [K],
  output node_rsp_t      rsp [K],
  input  logic           bus_req,
  input  logic [K-1:0]   bus_parts,
  output logic           bus_done,
  output logic           bcast_valid,
  output logic [GW-1:0]  bcast_g,
  output logic [1:0]     bcast_src
);

  logic [K-1:0]  tx_valid, busy, applying;
  logic [GW-1:0] tx_g [K];

  always_comb begin
    bus_done = bus_req && (&tick) && !bcast_valid && !(|busy) && !(|applying);
  end

  for (genvar k = 0; k < K; k++) begin : g_mod
    mr_bus_node #(.N(N), .M(k == 0 ? N : M), .FULL(k == 0), .NB(NB), .TMAX(TMAX)) u_node (
      .clk, .rst_n, .tick(tick[k]), .req(req[k]), .rsp(rsp[k]),
      .bus_xact(bus_done), .private_xact(bus_parts[k]),
      .rx_valid(bcast_valid && bcast_src != 2'(k)), .rx_g(bcast_g),
      .tx_valid(tx_valid[k]), .tx_g(tx_g[k]), .busy(busy[k])
    );
    assign applying[k] = rsp[k].rb_apply;
  end

  // Announcement register: largest count wins, lowest index on a tie.
  logic [K-1:0] win;

  always_comb begin
    for (int k = 0; k < K; k++) begin
      win[k] = tx_valid[k];
      for (int j = 0; j < K; j++)
        if (tx_valid[j] && (tx_g[j] > tx_g[k] || (tx_g[j] == tx_g[k] && j < k))) win[k] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcast_valid <= 1'b0;
      bcast_g     <= '0;
      bcast_src   <= '0;
    end else begin
      bcast_valid <= |tx_valid;
      for (int k = 0; k < K; k++) begin
        if (win[k]) begin
          bcast_g   <= tx_g[k];
          bcast_src <= 2'(k);
        end
      end
    end
  end

endmodule
