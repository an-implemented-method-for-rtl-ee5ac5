// tb_mm_scaling: the three multipliers on 16 x 16 tridiagonal matrices,
// where the difference in speed shows. Each design runs four random
// products through tb_mm_harness (results, per-step operation counts and
// places checked). On top of that, the testbench measures the run lengths
// and checks that d3 needs n+2 = 18 steps with operations against 3n-2 = 46
// for d1 and d2, and that its whole run (soaking and draining included) is
// more than twice as fast as that of d2.
module tb_mm_scaling;

  localparam int N = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks [3];
  int   failures [3];
  logic fin [3];
  int   run_cycles [3];
  int   own_checks = 0, own_failures = 0;

  always #5 clk = ~clk;

  tb_mm_harness #(.DESIGN(1), .N(N)) u_d1 (
    .clk, .rst_n, .checks(checks[0]), .failures(failures[0]), .fin(fin[0]));
  tb_mm_harness #(.DESIGN(2), .N(N)) u_d2 (
    .clk, .rst_n, .checks(checks[1]), .failures(failures[1]), .fin(fin[1]));
  tb_mm_harness #(.DESIGN(3), .N(N)) u_d3 (
    .clk, .rst_n, .checks(checks[2]), .failures(failures[2]), .fin(fin[2]));

  // run length of the first product of each design
  initial begin
    run_cycles = '{0, 0, 0};
    wait (rst_n);
    fork
      begin
        wait (u_d1.busy);
        @(negedge clk);
        while (u_d1.busy) begin run_cycles[0]++; @(negedge clk); end
      end
      begin
        wait (u_d2.busy);
        @(negedge clk);
        while (u_d2.busy) begin run_cycles[1]++; @(negedge clk); end
      end
      begin
        wait (u_d3.busy);
        @(negedge clk);
        while (u_d3.busy) begin run_cycles[2]++; @(negedge clk); end
      end
    join
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("run cycles at n=%0d: d1 %0d, d2 %0d, d3 %0d", N, run_cycles[0], run_cycles[1], run_cycles[2]);
    own_checks++;
    if (run_cycles[0] != 3 * N - 2) begin
      own_failures++;
      $display("FAIL: d1 run %0d cycles", run_cycles[0]);
    end
    own_checks++;
    if (!(2 * run_cycles[2] < run_cycles[1])) begin
      own_failures++;
      $display("FAIL: d3 not more than twice as fast as d2");
    end
    $display("TB_RESULT checks=%0d failures=%0d",
             checks[0] + checks[1] + checks[2] + own_checks,
             failures[0] + failures[1] + failures[2] + own_failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d",
             checks[0] + checks[1] + checks[2] + own_checks,
             failures[0] + failures[1] + failures[2] + own_failures + 1);
    $finish;
  end

endmodule
