// shadow_reg: a single state register (program counter, status word,
// pipeline latch) that can be rolled back up to N cycles in one cycle.
//
// Every enabled cycle the value held by the active register is copied into
// a small RAM of N shadow registers at the slot named by a pointer, and the
// pointer advances; the active register then takes the internal bus if
// `load` is set. Slot ptr-k therefore holds the value the register had k
// cycles ago. A rollback of C cycles moves the pointer back by C and copies
// slot ptr-C into the active register, so the restore takes one cycle
// whatever C is (a stack would need C cycles). The active register and
// every shadow slot carry an even parity bit made by a parity generator
// when the register is loaded; `parity_err` flags a stored word whose
// parity no longer matches. Reset clears the register and the shadow RAM.
//
// The RAM-plus-pointer structure, the parity bits and the default of four
// shadow registers follow the example design; the copy-every-cycle timing
// and the parity polarity are this design's choices.
//
// Interface: `tick` is the module's cycle enable; `rb`/`rb_cycles`
// (1..N) take priority over `load`. Timing: a rollback requested in cycle t
// is visible on `q` in cycle t+1.
module shadow_reg #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 4,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          load,
  input  logic [W-1:0]  d,
  input  logic          rb,
  input  logic [CW-1:0] rb_cycles,
  output logic [W-1:0]  q,
  output logic          parity_err
);

  logic [W:0]    active;          // {P, data}
  logic [W:0]    shadow [N];
  logic [PW-1:0] ptr;
  logic [PW-1:0] rb_ptr;

  // Slot of the value held rb_cycles cycles ago (pointer modulo N).
  always_comb begin
    rb_ptr = PW'((int'(ptr) + int'(N) - int'(rb_cycles)) % int'(N));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0;
      ptr    <= '0;
    end else if (tick) begin
      if (rb && rb_cycles != 0) begin
        active <= shadow[rb_ptr];
        ptr    <= rb_ptr;
      end else begin
        ptr <= PW'((int'(ptr) + 1) % int'(N));
        if (load) active <= {^d, d};
      end
    end
  end

  // Shadow RAM: written with the old active value every normal cycle.
  // Cleared at reset so that a rollback reaching back before the reset
  // returns the reset value with good parity.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) shadow[i] <= '0;
    end else if (tick && !(rb && rb_cycles != 0)) begin
      shadow[ptr] <= active;
    end
  end

  assign q          = active[W-1:0];
  assign parity_err = active[W] != ^active[W-1:0];

endmodule
