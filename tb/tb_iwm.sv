// tb_iwm: exhaustive check of the invalidate write mapper (M = 3): for
// every number of writes to undo (0..3) and every valid pattern, exactly the
// W valid cells nearest cell 0 (the newest) must be cleared, with an error
// when fewer than W are valid.
module tb_iwm;
  localparam int M = 3;
  logic [M-1:0] writes, valid, clear;
  logic         error;
  int checks = 0, failures = 0;

  iwm #(.M(M)) dut (.writes, .valid, .clear, .error);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w <= M; w++) begin
      for (int v = 0; v < 2 ** M; v++) begin
        logic [M-1:0] exp_c;
        int left;
        writes = M'((1 << w) - 1); valid = M'(v);
        #1;
        exp_c = '0; left = w;
        for (int k = 0; k < M; k++)
          if (((v >> k) & 1) == 1 && left > 0) begin exp_c[k] = 1'b1; left--; end
        checks++;
        if (clear !== exp_c || error !== (left > 0)) begin
          failures++;
          $display("FAIL w=%0d v=%b clear=%b err=%b exp %b", w, valid, clear, error, exp_c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
