// tb_mr_system: end-to-end test of the main processor and three
// coprocessors joined by point-to-point links, at the design's default
// sizes. The stimulus and the reference model are in p2p_harness:
//
// Phase 1 replays the fan-out example: with transactions placed on the
// three links in the main processor's last four cycles, a local rollback of
// 4 cycles there must send 1, 3 and 2 transactions to coprocessors 0, 1 and
// 2, which must then roll back 2, 6 and 3 of their own cycles (coprocessor 1
// runs on a faster clock than the main processor in this phase).
//
// Phase 2 runs all four modules on random clock-enable patterns with random
// register writes, state loads, transactions and checker-initiated
// rollbacks in every module. A reference model of each module and of the
// link timing predicts every read, state register, rollback, message and
// transaction, and what the main processor's commit buffer releases to a
// peripheral; the run counts each mechanism and fails if one never occurs.
module tb_mr_system;
  import mr_pkg::*;
  logic clk = 0, rst_n = 0, main_tick, io_valid, periph_valid, done;
  logic [2:0] cop_tick, xact_req, xact_done, down_valid, up_valid;
  node_req_t main_req, cop_req [3];
  node_rsp_t main_rsp, cop_rsp [3];
  logic [2:0] down_xacts [3], up_xacts [3];
  logic [31:0] io_data, periph_data, pin_data, main_in_data;
  logic pin_valid, pin_ready, main_in_valid;
  int checks, failures;

  mr_system dut (.*);
  p2p_harness h (.*);

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
