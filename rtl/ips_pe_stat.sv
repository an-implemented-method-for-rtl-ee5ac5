// ips_pe_stat: inner product step processor with a stationary c element.
//
// Used by the first design, where c(i,j) stays in the processor at (i,j)
// for the whole computation. The processor holds c in an accumulator
// register. In a step in which both the a and the b input carry a valid
// token it executes c := c + a * b. In every step it forwards the a and b
// tokens, registered, to its outgoing channels.
//
// Interface: a_i/b_i incoming channels, a_o/b_o registered outgoing ones,
// acc the current value of the stationary c element, active high in a step
// with an operation. clr empties the outgoing channels and sets c to zero,
// which is the initial value of C that the method requires.
//
// Following the method: operation, forwarding, stationary c. Own choices:
// valid bits, registered outputs, synchronous clear.
module ips_pe_stat
  import systolic_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  dtok_t a_i,
  input  dtok_t b_i,
  output dtok_t a_o,
  output dtok_t b_o,
  output acc_t  acc,
  output logic  active
);

  assign active = a_i.v && b_i.v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_o <= '0;
      b_o <= '0;
      acc <= '0;
    end else if (clr) begin
      a_o <= '0;
      b_o <= '0;
      acc <= '0;
    end else begin
      a_o <= a_i;
      b_o <= b_i;
      if (active) acc <= acc + ip_mul(a_i.d, b_i.d);
    end
  end

endmodule
