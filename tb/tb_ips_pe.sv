// tb_ips_pe: self-checking testbench of the moving-c inner product step
// processor. Drives random tokens for 400 cycles (with clear pulses in
// between) and checks every registered output one cycle later against a
// model: a and b forwarded unchanged, c forwarded, plus a*b when both a and
// b are valid; active exactly when a and b are both valid; a clear empties
// all three output channels.
module tb_ips_pe;
  import systolic_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  clr;
  dtok_t a_i, b_i, a_o, b_o;
  ctok_t c_i, c_o;
  logic  active;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  ips_pe dut (.clk, .rst_n, .clr, .a_i, .b_i, .c_i, .a_o, .b_o, .c_o, .active);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    dtok_t ea, eb;
    ctok_t ec;
    logic  ecl;
    clr = 1'b0; a_i = '0; b_i = '0; c_i = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(a_o == '0 && b_o == '0 && c_o == '0, "outputs empty after reset");
    for (int n = 0; n < 400; n++) begin
      a_i.v = 1'($urandom);
      a_i.d = data_t'($urandom);
      b_i.v = 1'($urandom);
      b_i.d = data_t'($urandom);
      c_i.d = acc_t'({$urandom, $urandom});
      c_i.v = (a_i.v && b_i.v) ? 1'b1 : 1'($urandom);
      clr   = ($urandom % 16) == 0;
      #1;
      check(active == (a_i.v && b_i.v), "active");
      ecl = clr;
      ea = a_i;
      eb = b_i;
      ec = c_i;
      if (a_i.v && b_i.v)
        ec.d = c_i.d + acc_t'(longint'(a_i.d) * longint'(b_i.d));
      @(negedge clk);
      if (ecl) begin
        check(!a_o.v && !b_o.v && !c_o.v, "clear empties the channels");
      end else begin
        check(a_o == ea, $sformatf("a forwarded: %h vs %h", a_o, ea));
        check(b_o == eb, "b forwarded");
        check(c_o == ec, $sformatf("c: %0d vs %0d", c_o.d, ec.d));
      end
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
