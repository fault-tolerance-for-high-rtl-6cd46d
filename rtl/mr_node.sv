// mr_node: a module (processor or coprocessor) equipped for micro rollback.
//
// It holds the state a core would change (a register file behind a delayed
// write buffer, and one individual state register such as a program counter
// with its shadow copies) plus one transducer per communication link. A
// rollback comes from one of two places:
//
//   * locally, from an error checker that flags, a few cycles late, data the
//     core has already used (`req.rb_req`, `req.rb_cycles` local cycles);
//   * from the module at the other end of link i, as a number of
//     transactions, which that link's transducer turns into local cycles.
//
// In one enabled cycle the node takes the largest of the requested cycle
// counts C, rolls the register file, the state register and every Transaction
// Monitor back C cycles, and tells every other link how many transactions
// with it lie inside those C cycles (no message when there are none, since
// the neighbour's state is then still consistent). A rollback that came from
// link i is not echoed back on link i: in a tree of modules that neighbour
// has already rolled back.
//
// Link timing (this design's choice): an outgoing message (`tx_valid`,
// `tx_xacts`) is registered and lasts one clock; an incoming one is held
// until this node's next enabled cycle. `busy[i]` asks the system to hold
// off transactions on link i while a message on it is in flight or a
// rollback is being applied, so both monitors see the same transactions.
//
// The parts, the per-link transducers and the translation rule follow the
// example design; merging simultaneous requests by taking the largest, the
// no-echo rule's implementation and the link timing are this design's.
//
// The transducers' monitor outputs are left open on purpose: the node
// needs only their conversions.
module mr_node
  import mr_pkg::*;
#(
  parameter int unsigned N     = 5,
  parameter int unsigned M     = 3,
  parameter bit          FULL  = 1'b0,
  parameter int unsigned NLINK = 1,
  parameter int unsigned TMAX  = 4,
  localparam int unsigned TCW  = $clog2(N + 1),
  localparam int unsigned LXW  = $clog2(TMAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  node_req_t         req,
  output node_rsp_t         rsp,
  input  logic [NLINK-1:0]  link_xact,
  input  logic [NLINK-1:0]  rx_valid,
  input  logic [LXW-1:0]    rx_xacts [NLINK],
  output logic [NLINK-1:0]  tx_valid,
  output logic [LXW-1:0]    tx_xacts [NLINK],
  output logic [NLINK-1:0]  busy
);

  // Incoming messages held until the next enabled cycle.
  logic [NLINK-1:0] pend;
  logic [LXW-1:0]   pend_x [NLINK];
  logic [NLINK-1:0] in_v;
  logic [LXW-1:0]   in_x   [NLINK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0;
      for (int i = 0; i < NLINK; i++) pend_x[i] <= '0;
    end else begin
      for (int i = 0; i < NLINK; i++) begin
        if (tick)             pend[i] <= 1'b0;
        else if (rx_valid[i]) begin
          pend[i]   <= 1'b1;
          pend_x[i] <= rx_xacts[i];
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NLINK; i++) begin
      in_v[i] = pend[i] || rx_valid[i];
      in_x[i] = pend[i] ? pend_x[i] : rx_xacts[i];
    end
  end

  // Translation per link and merge into one local rollback.
  logic [TCW-1:0]   rx_cyc [NLINK];
  logic [TCW-1:0]   tx_cyc_x;
  logic [LXW-1:0]   ctu_x  [NLINK];
  logic [NLINK-1:0] rx_err, tx_err;
  logic             local_req, local_err, rb_apply;
  logic [TCW-1:0]   rb_cyc;
  logic [NLINK-1:0] from_link;   // link i asked for a rollback this cycle

  always_comb begin
    local_req = req.rb_req && req.rb_cycles != 0;
    local_err = local_req && int'(req.rb_cycles) > int'(N);
    rb_cyc    = '0;
    if (local_req) rb_cyc = local_err ? TCW'(N) : TCW'(req.rb_cycles);
    for (int i = 0; i < NLINK; i++) begin
      from_link[i] = in_v[i] && in_x[i] != 0;
      if (from_link[i] && rx_cyc[i] > rb_cyc) rb_cyc = rx_cyc[i];
    end
    rb_apply = tick && rb_cyc != 0;
  end

  assign tx_cyc_x = rb_cyc;

  for (genvar i = 0; i < NLINK; i++) begin : g_link
    transducer #(.N(N), .TMAX(TMAX)) u_td (
      .clk, .rst_n, .tick,
      .xact(link_xact[i]),
      .tx_cycles(tx_cyc_x), .tx_xacts(ctu_x[i]), .tx_error(tx_err[i]),
      .rx_xacts(in_x[i]), .rx_cycles(rx_cyc[i]), .rx_error(rx_err[i]),
      .rb(rb_apply), .rb_cycles(rb_cyc), .tm()
    );
  end

  // Outgoing messages: every link except one that itself asked.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_valid <= '0;
      for (int i = 0; i < NLINK; i++) tx_xacts[i] <= '0;
    end else begin
      for (int i = 0; i < NLINK; i++) begin
        tx_valid[i] <= rb_apply && !from_link[i] && ctu_x[i] != 0;
        tx_xacts[i] <= ctu_x[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NLINK; i++)
      busy[i] = in_v[i] || tx_valid[i] || rb_apply;
  end

  // Rollback-capable state.
  logic rf_err, st_perr;
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

  logic td_err;
  always_comb begin
    td_err = 1'b0;
    for (int i = 0; i < NLINK; i++)
      td_err |= (rb_apply && !from_link[i] && tx_err[i]) ||
                (tick && from_link[i] && rx_err[i]);
  end

  always_comb begin
    rsp.rdata0    = rd0;
    rsp.rdata1    = rd1;
    rsp.st_q      = stq;
    rsp.rb_apply  = rb_apply;
    rsp.rb_cycles = CW'(rb_cyc);
    rsp.error     = rf_err || st_perr || td_err || (tick && local_err);
  end

endmodule
