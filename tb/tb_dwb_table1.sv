// tb_dwb_table1: runs every buffer size of the area table, N = 4, 5, 8 and
// 16 cycles, each with M = 2, 3 and 4 cells and with the full buffer
// (M = N), sixteen buffers in all, side by side. Each is driven and checked
// by its own dwb_grid_cell; the test passes when all sixteen finish without
// a failure.
module tb_dwb_table1;
  localparam int NS [4] = '{4, 5, 8, 16};
  localparam int MS [3] = '{2, 3, 4};
  logic clk = 0, rst_n = 0;
  int   c [16], f [16];
  logic d [16];

  for (genvar i = 0; i < 4; i++) begin : g_n
    for (genvar j = 0; j < 4; j++) begin : g_m
      dwb_grid_cell #(.N(NS[i]), .M(j < 3 ? MS[j] : NS[i]), .FULL(j == 3)) u (
        .clk, .rst_n, .checks(c[4*i+j]), .failures(f[4*i+j]), .done(d[4*i+j])
      );
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  function automatic bit all_done();
    for (int k = 0; k < 16; k++) if (!d[k]) return 0;
    return 1;
  endfunction

  initial begin
    int checks, failures;
    wait (rst_n);
    @(posedge clk);
    fork
      wait (all_done());
      repeat (20000) @(posedge clk);
    join_any
    checks = 0; failures = all_done() ? 0 : 1;
    for (int k = 0; k < 16; k++) begin checks += c[k]; failures += f[k]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
