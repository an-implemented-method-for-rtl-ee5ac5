// tb_band_matmul_d1: self-checking testbench of the design-1 band matrix
// multiplier. Runs the 4 x 4 tridiagonal example at the default parameters
// and a 7 x 7 product with unequal band widths (A: 2 above, 1 below the
// diagonal; B: 0 above, 2 below), four random products each, through
// tb_mm_harness, which compares results and per-step operation counts with
// an independent model.
module tb_band_matmul_d1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks0, failures0, checks1, failures1;
  logic fin0, fin1;

  always #5 clk = ~clk;

  tb_mm_harness #(.DESIGN(1)) u_default (
    .clk, .rst_n, .checks(checks0), .failures(failures0), .fin(fin0));

  tb_mm_harness #(.DESIGN(1), .N(7), .PA(2), .QA(1), .PB(0), .QB(2)) u_wide (
    .clk, .rst_n, .checks(checks1), .failures(failures1), .fin(fin1));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin0 && fin1);
    $display("TB_RESULT checks=%0d failures=%0d", checks0 + checks1, failures0 + failures1);
    $finish;
  end

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks0 + checks1, failures0 + failures1 + 1);
    $finish;
  end

endmodule
