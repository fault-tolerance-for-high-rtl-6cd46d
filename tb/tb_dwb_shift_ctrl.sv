// tb_dwb_shift_ctrl: exhaustive check of the buffer's shifting logic (M = 3)
// against the rules: nothing moves without the shift signal except the load
// of a new write; the oldest cell leaves only when it is valid and the oldest
// monitor bit is set; a cell takes its neighbour's contents only when it is
// empty or is being emptied itself this cycle.
module tb_dwb_shift_ctrl;
  localparam int M = 3;
  logic         shift, write, wm_oldest, shift_out;
  logic [M-1:0] valid, shift_in;
  int checks = 0, failures = 0;

  dwb_shift_ctrl #(.M(M)) dut (.shift, .write, .wm_oldest, .valid, .shift_in, .shift_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2 ** (M + 3); p++) begin
      logic eo;
      logic [M-1:0] ei;
      logic [M:0] leaving;  // leaving[k]: cell k is emptied this cycle
      {shift, write, wm_oldest, valid} = (M + 3)'(p);
      #1;
      eo = shift & wm_oldest & valid[M-1];
      leaving[M] = 1'b0;
      leaving[M-1] = eo;
      ei[0] = write;
      for (int k = M - 1; k >= 1; k--) begin
        ei[k] = shift & (!valid[k] | leaving[k]);
        leaving[k-1] = ei[k];
      end
      checks++;
      if (shift_out !== eo || shift_in !== ei) begin
        failures++;
        $display("FAIL in=%b out=%b/%b exp %b/%b", (M + 3)'(p), shift_in, shift_out, ei, eo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
