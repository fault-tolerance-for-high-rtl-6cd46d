// mr_top: the two system organisations for micro rollback, side by side.
//
//   * mr_system: a main processor and three coprocessors on point-to-point
//     links, each link with a transducer at both ends that translates
//     between local cycles and transactions on that link;
//   * mr_bus_system: a processor, an MMU, an FPU and an FFT unit on one
//     shared bus, where bus transactions serve as the common logical clock
//     and each module carries a two-level transducer.
//
// The two share only the clock and reset; each keeps its own ports, listed
// in the header of the instantiated block. Port names of the bus system
// carry the prefix `b_`.
module mr_top
  import mr_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // point-to-point system
  input  logic          main_tick,
  input  logic [2:0]    cop_tick,
  input  node_req_t     main_req,
  input  node_req_t     cop_req    [3],
  input  logic [2:0]    xact_req,
  input  logic          io_valid,
  input  logic [DW-1:0] io_data,
  output node_rsp_t     main_rsp,
  output node_rsp_t     cop_rsp    [3],
  output logic [2:0]    xact_done,
  output logic [2:0]    down_valid,
  output logic [2:0]    down_xacts [3],
  output logic [2:0]    up_valid,
  output logic [2:0]    up_xacts   [3],
  output logic          periph_valid,
  output logic [DW-1:0] periph_data,
  input  logic          pin_valid,
  input  logic [DW-1:0] pin_data,
  output logic          pin_ready,
  output logic          main_in_valid,
  output logic [DW-1:0] main_in_data,
  // bus system
  input  logic [3:0]    b_tick,
  input  node_req_t     b_req      [4],
  output node_rsp_t     b_rsp      [4],
  input  logic          b_bus_req,
  input  logic [3:0]    b_bus_parts,
  output logic          b_bus_done,
  output logic          b_bcast_valid,
  output logic [2:0]    b_bcast_g,
  output logic [1:0]    b_bcast_src
);

  mr_system u_p2p (
    .clk, .rst_n, .main_tick, .cop_tick, .main_req, .cop_req, .xact_req,
    .main_rsp, .cop_rsp, .xact_done, .down_valid, .down_xacts, .up_valid,
    .up_xacts, .io_valid, .io_data, .periph_valid, .periph_data,
    .pin_valid, .pin_data, .pin_ready, .main_in_valid, .main_in_data
  );

  mr_bus_system u_bus (
    .clk, .rst_n, .tick(b_tick), .req(b_req), .rsp(b_rsp),
    .bus_req(b_bus_req), .bus_parts(b_bus_parts), .bus_done(b_bus_done),
    .bcast_valid(b_bcast_valid), .bcast_g(b_bcast_g), .bcast_src(b_bcast_src)
  );

endmodule
