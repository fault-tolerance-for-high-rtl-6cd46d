// iwc: Invalidate Write Counter of the generalized delayed write buffer.
//
// The Write Monitor holds one bit per past cycle (bit 0 = the last cycle),
// set when that cycle wrote the register file. Given a rollback of `cycles`
// cycles, the IWC counts the writes among the first `cycles` monitor bits:
// those are the writes to invalidate. The count is returned as a
// thermometer code, writes[k-1] meaning "at least k writes", because the
// mapper that follows needs every line W, W-1, ..., 1. `error` is raised
// when more than M writes would have to be invalidated, which the buffer
// cannot hold.
//
// The inputs, outputs, the thermometer form and the error follow the
// example design, whose circuit is a precharged array of transmission-gate
// demultiplexer cells steered by the monitor bits. Here the same function is
// written as a count; the binary-to-one-hot decoder that feeds the array is
// the `cycles < i` comparison. Purely combinational.
module iwc #(
  parameter int unsigned N = 5,
  parameter int unsigned M = 3,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  wm,
  input  logic [CW-1:0] cycles,
  output logic [M-1:0]  writes,
  output logic          error
);

  int unsigned cnt;

  always_comb begin
    cnt = 0;
    for (int i = 0; i < N; i++)
      if (i < int'(cycles) && wm[i]) cnt++;
    for (int k = 0; k < M; k++)
      writes[k] = cnt > k;
    error = cnt > M;
  end

endmodule
