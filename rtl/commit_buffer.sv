// commit_buffer: output interface from a module capable of micro rollback
// to one that is not (a peripheral, an interrupt controller, memory-mapped
// I/O).
//
// A module that can roll back may emit data it later takes back. A module
// that cannot roll back must never see such data, so this interface delays
// every item by N enabled cycles, N being the furthest the sending module
// can roll back; after that the item is committed and released. A rollback
// of C cycles discards whatever the sender emitted in its last C cycles.
//
// The N-cycle delay and the release of committed data only follow the
// example design; the shift-register form, the behaviour in a rollback cycle
// (nothing moves or is released) and the data width are this design's.
//
// Interface: `tick` is the sender's cycle enable; `in_valid`/`in_data` is
// what the sender emits this cycle; `out_valid`/`out_data` is released to
// the receiver, combinationally, in the cycle the item leaves the buffer.
// The opposite direction, into the module that rolls back, is replay_buffer.
module commit_buffer #(
  parameter int unsigned N  = 5,
  parameter int unsigned DW = 32,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  input  logic          rb,
  input  logic [CW-1:0] rb_cycles,
  output logic          out_valid,
  output logic [DW-1:0] out_data
);

  logic [N-1:0]  v;
  logic [DW-1:0] d [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
    end else if (tick) begin
      if (rb) begin
        for (int i = 0; i < N; i++)
          if (i < int'(rb_cycles)) v[i] <= 1'b0;
      end else begin
        v <= {v[N-2:0], in_valid};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (tick && !rb) begin
      for (int i = N - 1; i > 0; i--) d[i] <= d[i-1];
      d[0] <= in_data;
    end
  end

  assign out_valid = tick && !rb && v[N-1];
  assign out_data  = d[N-1];

endmodule
