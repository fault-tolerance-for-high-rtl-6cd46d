// tcu: Transactions-to-Cycles Unit of a rollback transducer.
//
// Dual of the CTU. When the module at the other end of a link asks this
// module to undo its last `xacts` transactions with it, the TCU finds, in
// the Transaction Monitor (bit 0 = the last cycle), how far back the
// xacts-th most recent transaction lies: the module must roll back that
// many of its own cycles to reach the state it had before those
// transactions. Zero transactions give zero cycles. `error` is raised when
// the monitor holds fewer transactions than requested (the result is then
// N, the deepest rollback possible).
//
// Function, sizes (up to 4 transactions, 5 cycles) and error follow the
// example design; the circuit there is a switch array with a decoder in
// front and an encoder behind, written here as a scan. Purely combinational.
module tcu #(
  parameter int unsigned N    = 5,
  parameter int unsigned TMAX = 4,
  localparam int unsigned CW  = $clog2(N + 1),
  localparam int unsigned XW  = $clog2(TMAX + 1)
) (
  input  logic [N-1:0]  tm,
  input  logic [XW-1:0] xacts,
  output logic [CW-1:0] cycles,
  output logic          error
);

  int unsigned seen;
  logic        found;

  always_comb begin
    seen   = 0;
    found  = (xacts == 0);
    cycles = '0;
    for (int i = 0; i < N; i++) begin
      if (!found && tm[i]) begin
        seen++;
        if (seen == int'(xacts)) begin
          found  = 1'b1;
          cycles = CW'(i + 1);
        end
      end
    end
    error = !found;
    if (!found) cycles = CW'(N);
  end

endmodule
