// tb_mr_top: end-to-end test of the whole design with every parameter at
// its default. The point-to-point system and the bus system run at the same
// time, driven and checked by p2p_harness (fan-out example, then random
// operation with a reference model) and bus_harness (random operation with a
// reference model). Passes when both harnesses finish with no failure and
// every mechanism they count has occurred.
module tb_mr_top;
  import mr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic main_tick, io_valid, periph_valid, p_done;
  logic [2:0] cop_tick, xact_req, xact_done, down_valid, up_valid;
  node_req_t main_req, cop_req [3];
  node_rsp_t main_rsp, cop_rsp [3];
  logic [2:0] down_xacts [3], up_xacts [3];
  logic [31:0] io_data, periph_data, pin_data, main_in_data;
  logic pin_valid, pin_ready, main_in_valid;
  logic [3:0] b_tick, b_bus_parts;
  node_req_t b_req [4];
  node_rsp_t b_rsp [4];
  logic b_bus_req, b_bus_done, b_bcast_valid, b_done;
  logic [2:0] b_bcast_g;
  logic [1:0] b_bcast_src;
  int p_checks, p_failures, b_checks, b_failures;

  mr_top dut (.*);

  p2p_harness hp (
    .clk, .rst_n, .main_tick, .cop_tick, .main_req, .cop_req, .xact_req,
    .io_valid, .io_data, .main_rsp, .cop_rsp, .xact_done, .down_valid,
    .down_xacts, .up_valid, .up_xacts, .periph_valid, .periph_data,
    .pin_valid, .pin_data, .pin_ready, .main_in_valid, .main_in_data,
    .checks(p_checks), .failures(p_failures), .done(p_done)
  );

  bus_harness hb (
    .clk, .rst_n, .tick(b_tick), .req(b_req), .bus_req(b_bus_req),
    .bus_parts(b_bus_parts), .rsp(b_rsp), .bus_done(b_bus_done),
    .bcast_valid(b_bcast_valid), .bcast_g(b_bcast_g), .bcast_src(b_bcast_src),
    .checks(b_checks), .failures(b_failures), .done(b_done)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    int failures;
    fork
      wait (p_done && b_done);
      repeat (60000) @(posedge clk);
    join_any
    failures = p_failures + b_failures + ((p_done && b_done) ? 0 : 1);
    $display("TB_RESULT checks=%0d failures=%0d", p_checks + b_checks, failures);
    $finish;
  end
endmodule
