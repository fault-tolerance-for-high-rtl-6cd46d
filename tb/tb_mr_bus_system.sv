// tb_mr_bus_system: end-to-end test of the bus-connected system (processor,
// MMU, FPU, FFT) at its default sizes; stimulus and reference model are in
// bus_harness.
module tb_mr_bus_system;
  import mr_pkg::*;
  logic clk = 0, rst_n = 0, bus_req, bus_done, bcast_valid, done;
  logic [3:0] tick, bus_parts;
  node_req_t req [4];
  node_rsp_t rsp [4];
  logic [2:0] bcast_g;
  logic [1:0] bcast_src;
  int checks, failures;

  mr_bus_system dut (.*);
  bus_harness h (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    fork
      wait (done);
      repeat (60000) @(posedge clk);
    join_any
    if (!done) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
