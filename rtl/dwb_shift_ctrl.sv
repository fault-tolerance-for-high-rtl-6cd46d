// dwb_shift_ctrl: shifting logic of the generalized delayed write buffer.
//
// The buffer has M cells; a new write is loaded into cell 0 and cells move
// toward cell M-1, the one next to the register file. The oldest cell is
// shifted out into the register file only when the oldest Write Monitor bit
// is one, i.e. the write it holds is N cycles old and can no longer be
// undone. Every other cell moves up one place only if there is room: the
// cell above it is empty or is itself moving up this cycle. Nothing moves
// while `shift` is low (a rollback cycle or a stalled module).
//
// Signal names and which signals feed each output follow the example
// design (Shift out, Shift into FIFO[k], Shift Signal, Write instr., Valid
// Bit, Write monitor[N]). Purely combinational; shift_in[k] means cell k
// takes the contents of cell k-1 (shift_in[0]: cell 0 takes the new write).
module dwb_shift_ctrl #(
  parameter int unsigned M = 3
) (
  input  logic         shift,
  input  logic         write,
  input  logic         wm_oldest,
  input  logic [M-1:0] valid,
  output logic [M-1:0] shift_in,
  output logic         shift_out
);

  always_comb begin
    shift_out = shift && wm_oldest && valid[M-1];
    shift_in[0] = write;
    for (int k = M - 1; k >= 1; k--) begin
      if (k == M - 1) shift_in[k] = shift && (shift_out || !valid[k]);
      else            shift_in[k] = shift && (shift_in[k+1] || !valid[k]);
    end
  end

endmodule
