// transducer: cycles-to-transactions / transactions-to-cycles transducer
// for one link between two modules that may run on different clocks.
//
// Modules that interact asynchronously cannot agree on a number of cycles to
// roll back, but they can agree on a number of transactions between them.
// The transducer keeps a Transaction Monitor, an N-bit shift register that
// takes a one for each cycle of this module with a transaction on the link
// and a zero otherwise (bit 0 = the last cycle). When this module rolls back
// C cycles on its own, the CTU turns C into the number of transactions to
// send to the other module (`tx_*`). When a number of transactions arrives
// from the other module, the TCU turns it into the number of local cycles to
// roll back (`rx_*`). Whenever the module rolls back C cycles, whatever the
// cause, the first C monitor bits are cleared.
//
// Structure (monitor, CTU, TCU, 3-bit buses for N = 5, TMAX = 4) follows the
// example design; in a rollback cycle the monitor does not shift, which is
// this design's choice.
//
// Interface: `tick` is the module's cycle enable; `xact` marks a transaction
// in this cycle. `tx_xacts`/`tx_error` and `rx_cycles`/`rx_error` are
// combinational; `rb`/`rb_cycles` update the monitor at the clock edge.
module transducer #(
  parameter int unsigned N    = 5,
  parameter int unsigned TMAX = 4,
  localparam int unsigned CW  = $clog2(N + 1),
  localparam int unsigned XW  = $clog2(TMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          xact,
  input  logic [CW-1:0] tx_cycles,
  output logic [XW-1:0] tx_xacts,
  output logic          tx_error,
  input  logic [XW-1:0] rx_xacts,
  output logic [CW-1:0] rx_cycles,
  output logic          rx_error,
  input  logic          rb,
  input  logic [CW-1:0] rb_cycles,
  output logic [N-1:0]  tm
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tm <= '0;
    end else if (tick) begin
      if (rb) begin
        for (int i = 0; i < N; i++)
          if (i < int'(rb_cycles)) tm[i] <= 1'b0;
      end else begin
        tm <= {tm[N-2:0], xact};
      end
    end
  end

  ctu #(.N(N), .TMAX(TMAX)) u_ctu (
    .tm(tm), .cycles(tx_cycles), .xacts(tx_xacts), .error(tx_error)
  );

  tcu #(.N(N), .TMAX(TMAX)) u_tcu (
    .tm(tm), .xacts(rx_xacts), .cycles(rx_cycles), .error(rx_error)
  );

endmodule
