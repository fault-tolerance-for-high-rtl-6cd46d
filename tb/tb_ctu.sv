// tb_ctu: exhaustive check of the cycles-to-transactions unit (5 cycles,
// at most 4 transactions): every monitor pattern and rollback distance,
// including the saturation and error when 5 transactions are found, and the
// example monitor TM[5..1] = 0,1,0,0,1 with 5 cycles giving 2 transactions.
module tb_ctu;
  localparam int N = 5, TMAX = 4;
  logic [N-1:0] tm;
  logic [2:0]   cycles;
  logic [2:0]   xacts;
  logic         error;
  int checks = 0, failures = 0;

  ctu #(.N(N), .TMAX(TMAX)) dut (.tm, .cycles, .xacts, .error);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c <= N; c++) begin
      for (int p = 0; p < 2 ** N; p++) begin
        int cnt;
        tm = N'(p); cycles = 3'(c);
        #1;
        cnt = 0;
        for (int i = 0; i < c; i++) cnt += (p >> i) & 1;
        checks++;
        if (error !== (cnt > TMAX) || int'(xacts) != (cnt > TMAX ? TMAX : cnt)) begin
          failures++;
          $display("FAIL tm=%b c=%0d x=%0d err=%b", tm, c, xacts, error);
        end
      end
    end
    tm = 5'b01001; cycles = 3'd5; #1;
    checks++;
    if (xacts !== 3'd2 || error) begin failures++; $display("FAIL example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
