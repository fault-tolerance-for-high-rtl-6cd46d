// replay_buffer: input interface from a module that cannot roll back (a
// peripheral, memory-mapped I/O) to a module capable of micro rollback.
//
// The receiving module may roll back past the cycle in which it took an
// item; the sender cannot send it again. So this interface keeps every item
// it has handed over for N enabled cycles of the receiver, N being the
// furthest the receiver can roll back. A rollback of C cycles moves the
// items handed over in those C cycles into a replay queue, oldest first,
// and they are handed over again, one per cycle, before any new item is
// taken from the sender. Items that age past N cycles are committed and
// forgotten.
//
// Keeping each item for N cycles after its receipt so that it can be sent
// again follows the example design. The rest is this design's own choice:
// the per-cycle history of the last N cycles, the replay queue, replaying
// one item per cycle rather than in the original cycle pattern, holding
// the sender off during a replay, and nothing moving in a rollback cycle.
//
// The handed-over history and the replay queue together never hold more
// than N items (an item enters the history only in a cycle that hands one
// over, and new items are accepted only while the queue is empty), so a
// queue of N entries cannot overflow.
//
// Interface: `tick` is the receiver's cycle enable. The sender offers
// `in_valid`/`in_data` and holds them until `in_ready`. `out_valid`/
// `out_data` hand an item to the receiver, combinationally, in an enabled
// cycle that is not a rollback; the receiver takes it at the clock edge.
// `rb`/`rb_cycles` is the receiver's rollback, applied at the edge.
module replay_buffer #(
  parameter int unsigned N  = 5,
  parameter int unsigned DW = 32,
  localparam int unsigned CW = $clog2(N + 1),
  localparam int unsigned QW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  output logic          in_ready,
  input  logic          rb,
  input  logic [CW-1:0] rb_cycles,
  output logic          out_valid,
  output logic [DW-1:0] out_data
);

  // history: hv/hd[k] = item handed over k+1 enabled cycles ago
  logic [N-1:0]  hv;
  logic [DW-1:0] hd [N];
  // replay queue, head at index 0
  logic [QW-1:0] qn;
  logic [DW-1:0] qd [N];

  logic          take;
  logic [QW-1:0] qn_rb;
  logic [DW-1:0] qd_rb [N];

  assign take      = tick && !rb;
  assign in_ready  = take && qn == '0;
  assign out_valid = take && (qn != '0 || in_valid);
  assign out_data  = qn != '0 ? qd[0] : in_data;

  // Queue after a rollback: the undone history items, oldest first, then
  // whatever was already waiting.
  always_comb begin
    int unsigned n;
    n = 0;
    for (int j = 0; j < N; j++) qd_rb[j] = '0;
    for (int k = N - 1; k >= 0; k--)
      if (k < int'(rb_cycles) && hv[k]) begin
        qd_rb[n] = hd[k];
        n++;
      end
    for (int j = 0; j < N; j++)
      if (j < int'(qn) && n + j < N) qd_rb[n + j] = qd[j];
    qn_rb = QW'(n + qn);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hv <= '0;
      qn <= '0;
    end else if (tick) begin
      if (rb) begin
        for (int k = 0; k < N; k++)
          if (k < int'(rb_cycles)) hv[k] <= 1'b0;
        qn <= qn_rb;
      end else begin
        hv <= {hv[N-2:0], out_valid};
        if (qn != '0) qn <= qn - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (tick) begin
      if (rb) begin
        for (int j = 0; j < N; j++) qd[j] <= qd_rb[j];
      end else begin
        for (int k = N - 1; k > 0; k--) hd[k] <= hd[k-1];
        hd[0] <= out_data;
        for (int j = 0; j < N - 1; j++) qd[j] <= qd[j+1];
      end
    end
  end

endmodule
