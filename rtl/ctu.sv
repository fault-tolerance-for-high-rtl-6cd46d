// ctu: Cycles-to-Transactions Unit of a rollback transducer.
//
// The Transaction Monitor holds one bit per past cycle of the module (bit 0
// = the last cycle), set when that cycle carried a transaction with the
// module at the other end of the link. When the module rolls back `cycles`
// cycles, the CTU counts the transactions among the first `cycles` monitor
// bits: that many transactions must be undone by the other module. `error`
// is raised when the count exceeds TMAX, the most the link protocol allows
// in N cycles, and the count is then saturated at TMAX.
//
// Function, range (1..5 cycles to at most 4 transactions) and error follow
// the example design, whose circuit is the same switch array as the
// invalidate write counter followed by an encoder; here it is written as a
// count with a binary result. Purely combinational.
module ctu #(
  parameter int unsigned N    = 5,
  parameter int unsigned TMAX = 4,
  localparam int unsigned CW  = $clog2(N + 1),
  localparam int unsigned XW  = $clog2(TMAX + 1)
) (
  input  logic [N-1:0]  tm,
  input  logic [CW-1:0] cycles,
  output logic [XW-1:0] xacts,
  output logic          error
);

  int unsigned cnt;

  always_comb begin
    cnt = 0;
    for (int i = 0; i < N; i++)
      if (i < int'(cycles) && tm[i]) cnt++;
    error = cnt > TMAX;
    xacts = error ? XW'(TMAX) : XW'(cnt);
  end

endmodule
