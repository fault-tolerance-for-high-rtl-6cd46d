// mr_bus_node: a rollback-capable module attached to a shared system bus.
//
// Like mr_node it holds a register file behind a delayed write buffer and a
// state register with shadow copies, but it talks to the rest of the system
// over one bus instead of private links. Bus transactions, which every
// module sees, act as a common logical clock: a module that rolls back C of
// its own cycles announces on the bus how many bus transactions that is
// (bus_transducer: cycles -> private transactions -> bus transactions), and
// every other module converts that number back into its own cycles, which
// is zero for a module that took no part in those transactions.
//
// In one enabled cycle the node takes the larger of the local request and
// the received announcement, rolls its state back, clears the matching
// entries of both monitors and, if the rollback was its own, offers the
// number of bus transactions to announce (`tx_valid`, `tx_g`,
// combinational). An incoming announcement (`rx_valid`, `rx_g`) is held
// until the next enabled cycle; `busy` is high meanwhile.
//
// The two-monitor conversion follows the example design (its selective
// technique); the merge rule, the holding of announcements and the
// interface are this design's choices.
module mr_bus_node
  import mr_pkg::*;
#(
  parameter int unsigned N    = 5,
  parameter int unsigned M    = 3,
  parameter bit          FULL = 1'b0,
  parameter int unsigned NB   = 5,
  parameter int unsigned TMAX = 4,
  localparam int unsigned TCW = $clog2(N + 1),
  localparam int unsigned GW  = $clog2(NB + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  node_req_t     req,
  output node_rsp_t     rsp,
  input  logic          bus_xact,
  input  logic          private_xact,
  input  logic          rx_valid,
  input  logic [GW-1:0] rx_g,
  output logic          tx_valid,
  output logic [GW-1:0] tx_g,
  output logic          busy
);

  logic          pend;
  logic [GW-1:0] pend_g;
  logic          in_v;
  logic [GW-1:0] in_g;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend   <= 1'b0;
      pend_g <= '0;
    end else if (tick) begin
      pend <= 1'b0;
    end else if (rx_valid) begin
      pend   <= 1'b1;
      pend_g <= rx_g;
    end
  end

  assign in_v = pend || rx_valid;
  assign in_g = !in_v ? '0 : (pend ? pend_g : rx_g);
  assign busy = in_v;

  logic           local_req, local_err, rb_apply;
  logic [TCW-1:0] rx_cyc, rb_cyc, tx_cyc;
  logic [GW-1:0]  g_out, rb_g;
  logic           tx_err, rx_err;

  always_comb begin
    local_req = req.rb_req && req.rb_cycles != 0;
    local_err = local_req && int'(req.rb_cycles) > int'(N);
    rb_cyc    = '0;
    if (local_req) rb_cyc = local_err ? TCW'(N) : TCW'(req.rb_cycles);
    if (in_v && rx_cyc > rb_cyc) rb_cyc = rx_cyc;
    rb_apply  = tick && rb_cyc != 0;
    tx_cyc    = local_req ? rb_cyc : '0;
    rb_g      = in_g;
    if (local_req && g_out > rb_g) rb_g = g_out;
  end

  bus_transducer #(.N(N), .NB(NB), .TMAX(TMAX)) u_bt (
    .clk, .rst_n, .tick,
    .bus_xact, .private_xact,
    .tx_cycles(tx_cyc), .tx_bus_xacts(g_out), .tx_error(tx_err),
    .rx_bus_xacts(in_g), .rx_cycles(rx_cyc), .rx_error(rx_err),
    .rb(rb_apply), .rb_cycles(rb_cyc), .rb_bus_xacts(rb_g)
  );

  assign tx_valid = rb_apply && local_req && g_out != 0;
  assign tx_g     = g_out;

  logic          rf_err, st_perr;
  logic [DW-1:0] rd0, rd1, stq;

  rb_regfile #(.NREG(NREG), .DW(DW), .N(N), .M(M), .FULL(FULL)) u_rf (
    .clk, .rst_n, .tick,
    .we(req.we && !rb_apply), .waddr(req.waddr), .wdata(req.wdata),
    .raddr0(req.raddr0), .raddr1(req.raddr1), .rdata0(rd0), .rdata1(rd1),
    .rb(rb_apply), .rb_cycles(rb_cyc), .error(rf_err)
  );

  shadow_reg #(.W(DW), .N(N)) u_st (
    .clk, .rst_n, .tick,
    .load(req.st_load), .d(req.st_d),
    .rb(rb_apply), .rb_cycles(rb_cyc), .q(stq), .parity_err(st_perr)
  );

  always_comb begin
    rsp.rdata0    = rd0;
    rsp.rdata1    = rd1;
    rsp.st_q      = stq;
    rsp.rb_apply  = rb_apply;
    rsp.rb_cycles = CW'(rb_cyc);
    rsp.error     = rf_err || st_perr || (tick && local_err) ||
                    (rb_apply && local_req && tx_err) || (tick && in_v && rx_err);
  end

endmodule
