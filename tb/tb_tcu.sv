// tb_tcu: exhaustive check of the transactions-to-cycles unit (5 cycles, up
// to 4 transactions): for every monitor pattern and request, the result must
// be the shortest rollback that contains that many transactions, or an error
// when the monitor holds fewer. Includes the example TM[5..1] = 1,1,0,0,1
// where 2 transactions take 4 cycles.
module tb_tcu;
  localparam int N = 5, TMAX = 4;
  logic [N-1:0] tm;
  logic [2:0]   xacts;
  logic [2:0]   cycles;
  logic         error;
  int checks = 0, failures = 0;

  tcu #(.N(N), .TMAX(TMAX)) dut (.tm, .xacts, .cycles, .error);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t <= TMAX; t++) begin
      for (int p = 0; p < 2 ** N; p++) begin
        int exp_c, cnt;
        logic exp_e;
        tm = N'(p); xacts = 3'(t);
        #1;
        // smallest c with at least t ones in the first c bits
        exp_c = -1;
        for (int c = 0; c <= N && exp_c < 0; c++) begin
          cnt = 0;
          for (int i = 0; i < c; i++) cnt += (p >> i) & 1;
          if (cnt >= t) exp_c = c;
        end
        exp_e = exp_c < 0;
        checks++;
        if (error !== exp_e || (!exp_e && int'(cycles) != exp_c)) begin
          failures++;
          $display("FAIL tm=%b t=%0d cyc=%0d err=%b exp %0d", tm, t, cycles, error, exp_c);
        end
      end
    end
    tm = 5'b11001; xacts = 3'd2; #1;
    checks++;
    if (cycles !== 3'd4 || error) begin failures++; $display("FAIL example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
