// bus_transducer: rollback interface of a module on a shared system bus.
//
// With point-to-point links each pair of modules counts its own
// transactions. On a common bus this could start a chain of ever deeper
// rollbacks between modules, so the bus transactions, which every module
// sees, serve as a common logical clock. Each module carries two
// transducers in series:
//
//   * the bus transducer's monitor shifts once per bus transaction and takes
//     a one when the transaction is the module's own (private);
//   * the cycle transducer's monitor shifts once per module cycle and takes a
//     one when a private bus transaction happened in that cycle.
//
// A rollback request arriving on the bus as G generic bus transactions is
// turned into P private transactions (bus transducer, counting) and then
// into C local cycles (cycle transducer, searching). A local rollback of C
// cycles goes the other way: C cycles -> P private transactions -> the G bus
// transactions that reach back to the P-th private one, which is what the
// module puts on the bus. A module without private transactions in range
// gets C = 0 and does not roll back.
//
// The two-monitor arrangement and the conversion chain follow the example
// design (its second, selective technique); the depths (5 cycles, 5 bus
// transactions), the limit of 4 private transactions and the interface are
// this design's choices.
//
// Interface: `tick` is the module's cycle enable; `bus_xact` marks a bus
// transaction seen in this cycle and `private_xact` that it was this
// module's. Conversions are combinational. `rb`/`rb_cycles`/`rb_bus_xacts`
// apply a rollback: the first rb_cycles cycle entries and the first
// rb_bus_xacts bus entries are cleared.
//
// The monitor outputs of the two inner transducers are left open on
// purpose: only their conversions are used.
module bus_transducer #(
  parameter int unsigned N    = 5,
  parameter int unsigned NB   = 5,
  parameter int unsigned TMAX = 4,
  localparam int unsigned CW  = $clog2(N + 1),
  localparam int unsigned GW  = $clog2(NB + 1),
  localparam int unsigned PW  = $clog2(TMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          bus_xact,
  input  logic          private_xact,
  input  logic [CW-1:0] tx_cycles,
  output logic [GW-1:0] tx_bus_xacts,
  output logic          tx_error,
  input  logic [GW-1:0] rx_bus_xacts,
  output logic [CW-1:0] rx_cycles,
  output logic          rx_error,
  input  logic          rb,
  input  logic [CW-1:0] rb_cycles,
  input  logic [GW-1:0] rb_bus_xacts
);

  logic [PW-1:0] tx_priv, rx_priv;
  logic          e_tx_c, e_tx_b, e_rx_b, e_rx_c;
  logic          bus_tick, bus_rb;

  // The bus monitor advances on bus transactions; it is also clocked in a
  // rollback cycle so that its entries can be cleared.
  assign bus_rb   = rb && rb_bus_xacts != 0;
  assign bus_tick = tick && (bus_rb || (bus_xact && !rb));

  // Bus transducer: "cycles" are bus transactions, "transactions" private ones.
  transducer #(.N(NB), .TMAX(TMAX)) u_bus (
    .clk, .rst_n, .tick(bus_tick), .xact(private_xact),
    .tx_cycles(rx_bus_xacts), .tx_xacts(rx_priv), .tx_error(e_rx_b),
    .rx_xacts(tx_priv), .rx_cycles(tx_bus_xacts), .rx_error(e_tx_b),
    .rb(bus_rb), .rb_cycles(rb_bus_xacts), .tm()
  );

  // Cycle transducer: module cycles against private bus transactions.
  transducer #(.N(N), .TMAX(TMAX)) u_cyc (
    .clk, .rst_n, .tick, .xact(bus_xact && private_xact),
    .tx_cycles(tx_cycles), .tx_xacts(tx_priv), .tx_error(e_tx_c),
    .rx_xacts(rx_priv), .rx_cycles(rx_cycles), .rx_error(e_rx_c),
    .rb(rb), .rb_cycles(rb_cycles), .tm()
  );

  assign tx_error = e_tx_c || e_tx_b;
  assign rx_error = e_rx_b || e_rx_c;

endmodule
