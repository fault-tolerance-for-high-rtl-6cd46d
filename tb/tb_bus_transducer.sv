// tb_bus_transducer: random test of the two-level bus rollback interface
// (5 cycles, 5 bus transactions, up to 4 private ones). Reference monitors
// are kept for bus transactions (one entry per bus transaction, one for a
// private one) and for cycles (one entry per cycle, one for a cycle with a
// private bus transaction). Conversions generic -> private -> cycles and
// cycles -> private -> generic are recomputed on them every cycle.
module tb_bus_transducer;
  localparam int N = 5, NB = 5, TMAX = 4;
  logic clk = 0, rst_n = 0, tick, bus_xact, private_xact, rb, tx_error, rx_error;
  logic [2:0] tx_cycles, tx_bus_xacts, rx_bus_xacts, rx_cycles, rb_cycles, rb_bus_xacts;
  int checks = 0, failures = 0, rbs = 0, selective = 0;
  logic [NB-1:0] bm;
  logic [N-1:0]  cm;

  bus_transducer #(.N(N), .NB(NB), .TMAX(TMAX)) dut (.*);

  always #5 clk = ~clk;

  // ones among the first n entries
  function automatic int count(logic [7:0] m, int n);
    int c = 0;
    for (int i = 0; i < n; i++) c += int'(m[i]);
    return c;
  endfunction

  // entries needed to reach the t-th one; -1 if there are fewer
  function automatic int reach(logic [7:0] m, int len, int t);
    int c = 0;
    if (t == 0) return 0;
    for (int i = 0; i < len; i++) begin
      c += int'(m[i]);
      if (c == t) return i + 1;
    end
    return -1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick = 0; bus_xact = 0; private_xact = 0; rb = 0; rb_cycles = 0; rb_bus_xacts = 0;
    tx_cycles = 0; rx_bus_xacts = 0;
    bm = '0; cm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int p, c, g;
      @(negedge clk);
      tick = $urandom_range(0, 7) != 0;
      bus_xact = $urandom_range(0, 1) == 1;
      private_xact = $urandom_range(0, 2) == 0;
      tx_cycles = 3'($urandom_range(0, N));
      rx_bus_xacts = 3'($urandom_range(0, NB));
      rb = $urandom_range(0, 7) == 0;
      rb_cycles = 3'($urandom_range(1, N));
      rb_bus_xacts = 3'($urandom_range(0, NB));
      #1;
      // receive: generic -> private -> cycles
      p = count(8'(bm), int'(rx_bus_xacts));
      c = (p > TMAX) ? -1 : reach(8'(cm), N, p);
      checks++;
      if (c >= 0) begin
        if (rx_error || int'(rx_cycles) != c) begin
          failures++;
          if (failures < 10) $display("FAIL rx bm=%b cm=%b g=%0d -> %0d exp %0d", bm, cm, rx_bus_xacts, rx_cycles, c);
        end
        if (rx_bus_xacts != 0 && c == 0) selective++;
      end else if (!rx_error) failures++;
      // send: cycles -> private -> generic
      p = count(8'(cm), int'(tx_cycles));
      g = (p > TMAX) ? -1 : reach(8'(bm), NB, p);
      checks++;
      if (g >= 0) begin
        if (tx_error || int'(tx_bus_xacts) != g) begin
          failures++;
          if (failures < 10) $display("FAIL tx cm=%b bm=%b c=%0d -> %0d exp %0d", cm, bm, tx_cycles, tx_bus_xacts, g);
        end
      end else if (!tx_error) failures++;
      @(posedge clk);
      if (tick) begin
        if (rb) begin
          rbs++;
          for (int i = 0; i < int'(rb_cycles); i++) cm[i] = 1'b0;
          for (int i = 0; i < int'(rb_bus_xacts); i++) bm[i] = 1'b0;
        end else begin
          cm = {cm[N-2:0], bus_xact && private_xact};
          if (bus_xact) bm = {bm[NB-2:0], private_xact};
        end
      end
    end
    checks++;
    if (rbs < 300 || selective == 0) failures++;
    $display("rollbacks=%0d requests_needing_no_rollback=%0d", rbs, selective);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
