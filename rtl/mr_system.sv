// mr_system: a main processor and three coprocessors with micro rollback.
//
// The four modules run on clocks of their own rate (modelled here by one
// clock and a clock enable per module) and talk over three point-to-point
// links, forming a tree with the main processor at the root. Each module
// checks its inputs in parallel with using them; when a checker fires a few
// cycles late, the module rolls itself back and its transducers tell each
// neighbour how many transactions to undo. Each neighbour turns that number
// into its own cycles and rolls back as far as needed to be consistent.
//
// Configuration: the main processor, which may write its register file every
// cycle, has a full delayed write buffer with N = 5. Coprocessors 0 and 2 use
// the buffer for infrequently modified registers with N = 5, M = 3;
// coprocessor 1 uses N = 8, M = 2 so that it can go back the 6 cycles of the
// larger example. The topology and buffer sizes follow the example design;
// the clock-enable model, link timing and the N of each module are this
// design's choices.
//
// Interface: `main_req`/`cop_req` carry what each core does in a cycle
// (register writes, state-register loads, checker-initiated rollbacks);
// `xact_req[i]` asks for a transaction on link i, which happens
// (`xact_done[i]`) only in a cycle where both ends are enabled and neither
// end is busy with a rollback. `down_*` (main to coprocessor) and `up_*`
// (coprocessor to main) show the rollback messages on each link.
// `io_valid`/`io_data` is what the main processor sends to a peripheral that
// cannot roll back; it reaches the peripheral (`periph_*`) through a commit
// buffer, MAIN_N main-processor cycles later, unless a rollback took it back.
// `pin_*` is what that peripheral sends back: the main processor takes it
// (`main_in_*`) through a replay buffer, which hands it over again if the
// main processor rolls back past the cycle it took it in. The peripheral
// holds `pin_valid`/`pin_data` until `pin_ready`.
module mr_system
  import mr_pkg::*;
#(
  parameter int unsigned MAIN_N = 5,
  parameter int unsigned COP0_N = 5,
  parameter int unsigned COP0_M = 3,
  parameter int unsigned COP1_N = 8,
  parameter int unsigned COP1_M = 2,
  parameter int unsigned COP2_N = 5,
  parameter int unsigned COP2_M = 3,
  parameter int unsigned TMAX   = 4,
  localparam int unsigned NCOP  = 3,
  localparam int unsigned LXW   = $clog2(TMAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            main_tick,
  input  logic [NCOP-1:0] cop_tick,
  input  node_req_t       main_req,
  input  node_req_t       cop_req   [NCOP],
  input  logic [NCOP-1:0] xact_req,
  output node_rsp_t       main_rsp,
  output node_rsp_t       cop_rsp   [NCOP],
  output logic [NCOP-1:0] xact_done,
  output logic [NCOP-1:0] down_valid,
  output logic [LXW-1:0]  down_xacts [NCOP],
  output logic [NCOP-1:0] up_valid,
  output logic [LXW-1:0]  up_xacts   [NCOP],
  input  logic            io_valid,
  input  logic [DW-1:0]   io_data,
  output logic            periph_valid,
  output logic [DW-1:0]   periph_data,
  input  logic            pin_valid,
  input  logic [DW-1:0]   pin_data,
  output logic            pin_ready,
  output logic            main_in_valid,
  output logic [DW-1:0]   main_in_data
);

  logic [NCOP-1:0] main_busy;
  logic            cop_busy [NCOP];

  always_comb begin
    for (int i = 0; i < NCOP; i++)
      xact_done[i] = xact_req[i] && main_tick && cop_tick[i] &&
                     !main_busy[i] && !cop_busy[i];
  end

  mr_node #(.N(MAIN_N), .M(MAIN_N), .FULL(1'b1), .NLINK(NCOP), .TMAX(TMAX)) u_main (
    .clk, .rst_n, .tick(main_tick), .req(main_req), .rsp(main_rsp),
    .link_xact(xact_done), .rx_valid(up_valid), .rx_xacts(up_xacts),
    .tx_valid(down_valid), .tx_xacts(down_xacts), .busy(main_busy)
  );

  // Output to a peripheral without rollback: released once committed.
  commit_buffer #(.N(MAIN_N), .DW(DW)) u_io (
    .clk, .rst_n, .tick(main_tick),
    .in_valid(io_valid && !main_rsp.rb_apply), .in_data(io_data),
    .rb(main_rsp.rb_apply), .rb_cycles($clog2(MAIN_N + 1)'(main_rsp.rb_cycles)),
    .out_valid(periph_valid), .out_data(periph_data)
  );

  // Input from that peripheral: kept MAIN_N cycles for replay after a rollback.
  replay_buffer #(.N(MAIN_N), .DW(DW)) u_pin (
    .clk, .rst_n, .tick(main_tick),
    .in_valid(pin_valid), .in_data(pin_data), .in_ready(pin_ready),
    .rb(main_rsp.rb_apply), .rb_cycles($clog2(MAIN_N + 1)'(main_rsp.rb_cycles)),
    .out_valid(main_in_valid), .out_data(main_in_data)
  );

  localparam int unsigned CN [NCOP] = '{COP0_N, COP1_N, COP2_N};
  localparam int unsigned CM [NCOP] = '{COP0_M, COP1_M, COP2_M};

  for (genvar i = 0; i < NCOP; i++) begin : g_cop
    logic [LXW-1:0] rx [1];
    logic [LXW-1:0] tx [1];
    assign rx[0]       = down_xacts[i];
    assign up_xacts[i] = tx[0];
    mr_node #(.N(CN[i]), .M(CM[i]), .FULL(1'b0), .NLINK(1), .TMAX(TMAX)) u_cop (
      .clk, .rst_n, .tick(cop_tick[i]), .req(cop_req[i]), .rsp(cop_rsp[i]),
      .link_xact(xact_done[i]), .rx_valid(down_valid[i]), .rx_xacts(rx),
      .tx_valid(up_valid[i]), .tx_xacts(tx), .busy(cop_busy[i])
    );
  end

endmodule
