// tb_ips_pe_stat: self-checking testbench of the stationary-c inner
// product step processor. Runs 20 random accumulations of up to 12 terms
// with gaps (steps in which a or b is missing), each started by a clear,
// and checks the forwarded a and b tokens every cycle and the accumulated
// c against a model sum.
module tb_ips_pe_stat;
  import systolic_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  clr;
  dtok_t a_i, b_i, a_o, b_o;
  acc_t  acc;
  logic  active;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  ips_pe_stat dut (.clk, .rst_n, .clr, .a_i, .b_i, .a_o, .b_o, .acc, .active);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    acc_t  sum;
    dtok_t ea, eb;
    clr = 1'b0; a_i = '0; b_i = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      @(negedge clk);
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      check(acc == '0 && !a_o.v && !b_o.v, "clear");
      sum = '0;
      for (int n = 0; n < 12; n++) begin
        a_i.v = ($urandom % 4) != 0;
        a_i.d = data_t'($urandom);
        b_i.v = ($urandom % 4) != 0;
        b_i.d = data_t'($urandom);
        #1;
        check(active == (a_i.v && b_i.v), "active");
        if (a_i.v && b_i.v) sum += acc_t'(longint'(a_i.d) * longint'(b_i.d));
        ea = a_i;
        eb = b_i;
        @(negedge clk);
        check(a_o == ea && b_o == eb, "a and b forwarded");
        check(acc == sum, $sformatf("acc %0d, expected %0d", acc, sum));
      end
      a_i = '0;
      b_i = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
