// iwm: Invalidate Write Mapper of the generalized delayed write buffer.
//
// The buffer has M cells, cell 0 receiving each new write, and cells move
// toward cell M-1 in order, so among the valid cells the lower the index the
// newer the write. Given W writes to undo (thermometer code from the
// invalidate write counter), the mapper asserts clear[k] for the W valid
// cells with the lowest indexes. `error` is raised when fewer than W cells
// are valid.
//
// Inputs and outputs (writes, valid bits, clear-valid lines, error) follow
// the example design; the "newest W valid cells" rule is this design's
// reading of it, written as a running count. Purely combinational.
module iwm #(
  parameter int unsigned M = 3
) (
  input  logic [M-1:0] writes,
  input  logic [M-1:0] valid,
  output logic [M-1:0] clear,
  output logic         error
);

  int unsigned w;
  int unsigned seen;

  always_comb begin
    w = 0;
    for (int k = 0; k < M; k++)
      if (writes[k]) w = k + 1;
    seen = 0;
    for (int k = 0; k < M; k++) begin
      clear[k] = 1'b0;
      if (valid[k] && seen < w) begin
        clear[k] = 1'b1;
        seen++;
      end
    end
    error = seen < w;
  end

endmodule
