// tb_iwc: exhaustive check of the invalidate write counter (N = 5, M = 3):
// every Write Monitor pattern against every rollback distance 0..5, with the
// expected count worked out bit by bit here; includes the worked example of
// monitor [X0110] rolled back 4 cycles, which must give "2 writes".
module tb_iwc;
  localparam int N = 5, M = 3;
  logic [N-1:0] wm;
  logic [2:0]   cycles;
  logic [M-1:0] writes;
  logic         error;
  int checks = 0, failures = 0;

  iwc #(.N(N), .M(M)) dut (.wm, .cycles, .writes, .error);

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
        logic [M-1:0] exp_w;
        wm = N'(p); cycles = 3'(c);
        #1;
        cnt = 0;
        for (int i = 0; i < c; i++) cnt += (p >> i) & 1;
        exp_w = '0;
        for (int k = 1; k <= M; k++) if (cnt >= k) exp_w[k-1] = 1'b1;
        checks++;
        if (writes !== exp_w || error !== (cnt > M)) begin
          failures++;
          $display("FAIL wm=%b c=%0d writes=%b err=%b exp %b/%0d", wm, c, writes, error, exp_w, cnt > M);
        end
      end
    end
    // WM[1..5] = 0,1,1,0,X ; 4 cycles -> 2 writes and 1 write
    for (int x = 0; x < 2; x++) begin
      wm = {1'(x), 4'b0110}; cycles = 3'd4; #1;
      checks++;
      if (writes !== 3'b011 || error) begin failures++; $display("FAIL example"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
