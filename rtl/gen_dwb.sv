// gen_dwb: delayed write buffer for infrequently modified registers.
//
// A full delayed write buffer keeps one cell per cycle of rollback range N.
// When a module writes its register file at most M times in any N
// consecutive cycles (M < N), M cells suffice. The buffer then needs to
// know how many of its cells a rollback of C cycles must invalidate, which
// a control section works out:
//
//   * Write Monitor (WM): an N-bit shift register; a one is shifted in for a
//     cycle that wrote, a zero otherwise. Bit 0 is the last cycle. More than
//     M ones means the module broke its write-rate promise (`error`).
//   * Invalidate Write Counter (iwc): writes among the first C WM bits.
//   * Invalidate Write Mapper (iwm): which valid cells hold those writes
//     (the newest ones); their valid bits are cleared in the same cycle.
//   * Shifting logic (dwb_shift_ctrl): the oldest cell is written into the
//     register file when the oldest WM bit is one, i.e. exactly N cycles
//     after the write; other cells move toward the output only if there is
//     room, so the cells stay in write order.
//
// The data cells, the address CAM with valid bits and the priority circuit
// behave as in the full buffer: a read returns the newest matching cell.
//
// Structure and defaults (N = 5, M = 3) follow the example design. This
// design's choices: 32-bit data and 6-bit register addresses; in a rollback
// cycle the shift signal is low, so nothing moves, nothing commits, no write
// is accepted and the WM does not shift, and WM bits 0..C-1 are cleared.
//
// Interface: `tick` is the cycle enable; `rb_cycles` is 1..N. `hit`/`hdata`
// answer the read ports combinationally; `commit*` is to be written into the
// register file at the same clock edge. `error` is combinational.
module gen_dwb #(
  parameter int unsigned N  = 5,
  parameter int unsigned M  = 3,
  parameter int unsigned AW = 6,
  parameter int unsigned DW = 32,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rb,
  input  logic [CW-1:0] rb_cycles,
  input  logic [AW-1:0] raddr [2],
  output logic          hit   [2],
  output logic [DW-1:0] hdata [2],
  output logic          commit,
  output logic [AW-1:0] commit_addr,
  output logic [DW-1:0] commit_data,
  output logic          error
);

  logic [N-1:0]  wm;
  logic [M-1:0]  valid;
  logic [AW-1:0] addr [M];
  logic [DW-1:0] data [M];

  logic [M-1:0]  writes, clear, shift_in, vacate;
  logic          shift_out, shift, wr;
  logic          iwc_err, iwm_err, wm_err, lost_err;
  int unsigned   wm_ones;

  assign shift = !rb;
  assign wr    = we && !rb;

  iwc #(.N(N), .M(M)) u_iwc (
    .wm(wm), .cycles(rb_cycles), .writes(writes), .error(iwc_err)
  );

  iwm #(.M(M)) u_iwm (
    .writes(writes), .valid(valid), .clear(clear), .error(iwm_err)
  );

  dwb_shift_ctrl #(.M(M)) u_shift (
    .shift(shift), .write(wr), .wm_oldest(wm[N-1]), .valid(valid),
    .shift_in(shift_in), .shift_out(shift_out)
  );

  // A cell is vacated when its contents move on (or out).
  always_comb begin
    for (int k = 0; k < M; k++)
      vacate[k] = (k == M - 1) ? shift_out : shift_in[(k + 1) % M];
  end

  // Ones the WM would hold after this cycle's shift.
  always_comb begin
    wm_ones = 0;
    for (int i = 0; i < N - 1; i++)
      if (wm[i]) wm_ones++;
    if (wr) wm_ones++;
  end

  assign wm_err   = tick && wr && wm_ones > M;
  assign lost_err = tick && wr && valid[0] && !vacate[0];
  assign error    = wm_err || lost_err || (tick && rb && (iwc_err || iwm_err));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wm    <= '0;
      valid <= '0;
    end else if (tick) begin
      if (rb) begin
        for (int i = 0; i < N; i++)
          if (i < int'(rb_cycles)) wm[i] <= 1'b0;
        valid <= valid & ~clear;
      end else begin
        wm <= {wm[N-2:0], wr};
        for (int k = 0; k < M; k++) begin
          if (shift_in[k]) valid[k] <= (k == 0) ? 1'b1 : valid[(k + M - 1) % M];
          else if (vacate[k]) valid[k] <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (tick) begin
      for (int k = 0; k < M; k++) begin
        if (shift_in[k]) begin
          addr[k] <= (k == 0) ? waddr : addr[(k + M - 1) % M];
          data[k] <= (k == 0) ? wdata : data[(k + M - 1) % M];
        end
      end
    end
  end

  assign commit      = tick && shift_out;
  assign commit_addr = addr[M-1];
  assign commit_data = data[M-1];

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      hit[p]   = 1'b0;
      hdata[p] = '0;
      for (int k = M - 1; k >= 0; k--) begin
        if (valid[k] && addr[k] == raddr[p]) begin
          hit[p]   = 1'b1;
          hdata[p] = data[k];
        end
      end
    end
  end

endmodule
