// tb_transducer: random test of one link's transducer (5 cycles, up to 4
// transactions). A reference Transaction Monitor takes a one for every
// enabled cycle with a transaction; a rollback of C cycles clears its first
// C entries and does not shift. Each cycle the transaction count for a
// random number of cycles and the cycle count for a random number of
// transactions are compared with counts made on the reference.
module tb_transducer;
  localparam int N = 5, TMAX = 4;
  logic clk = 0, rst_n = 0, tick, xact, rb, tx_error, rx_error;
  logic [2:0] tx_cycles, tx_xacts, rx_xacts, rx_cycles, rb_cycles;
  logic [N-1:0] tm;
  int checks = 0, failures = 0, rbs = 0, rxerrs = 0;
  logic [N-1:0] ref_tm;

  transducer #(.N(N), .TMAX(TMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick = 0; xact = 0; rb = 0; rb_cycles = 0; tx_cycles = 0; rx_xacts = 0;
    ref_tm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int cnt, ec;
      @(negedge clk);
      tick = $urandom_range(0, 7) != 0;
      xact = $urandom_range(0, 2) == 0;
      rb = $urandom_range(0, 5) == 0;
      rb_cycles = 3'($urandom_range(1, N));
      tx_cycles = 3'($urandom_range(0, N));
      rx_xacts = 3'($urandom_range(0, TMAX));
      #1;
      cnt = 0;
      for (int i = 0; i < int'(tx_cycles); i++) cnt += int'(ref_tm[i]);
      checks++;
      if (int'(tx_xacts) != (cnt > TMAX ? TMAX : cnt) || tx_error != (cnt > TMAX)) begin
        failures++; $display("FAIL tx tm=%b c=%0d x=%0d", ref_tm, tx_cycles, tx_xacts);
      end
      ec = -1; cnt = 0;
      if (rx_xacts == 0) ec = 0;
      for (int i = 0; i < N && ec < 0; i++) begin
        cnt += int'(ref_tm[i]);
        if (cnt == int'(rx_xacts)) ec = i + 1;
      end
      checks++;
      if (rx_error != (ec < 0) || (ec >= 0 && int'(rx_cycles) != ec)) begin
        failures++; $display("FAIL rx tm=%b x=%0d c=%0d", ref_tm, rx_xacts, rx_cycles);
      end
      if (ec < 0) rxerrs++;
      checks++;
      if (tm !== ref_tm) failures++;
      @(posedge clk);
      if (tick) begin
        if (rb) begin
          rbs++;
          for (int i = 0; i < int'(rb_cycles); i++) ref_tm[i] = 1'b0;
        end else ref_tm = {ref_tm[N-2:0], xact};
      end
    end
    checks++;
    if (rbs < 300 || rxerrs == 0) failures++;
    $display("rollbacks=%0d rx_errors=%0d", rbs, rxerrs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
