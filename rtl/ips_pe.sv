// ips_pe: inner product step processor for arrays in which c moves.
//
// Each clock cycle is one systolic step. When both the a and the b input
// carry a valid token the processor is assigned the inner product step
// c := c + a * b: it adds the product to the c token passing through it.
// When it is not assigned an operation it simply forwards the tokens on its
// input channels to its output channels. a, b and c are always forwarded,
// each on its own outgoing channel, one step later (all outputs are
// registered). The enclosing array decides where each channel leads.
//
// Interface: a_i/b_i/c_i are the incoming channels, a_o/b_o/c_o the
// registered outgoing ones. active is high, combinationally, in a step in
// which the processor executes an inner product step. clr drops every token
// held in the output registers (used when a new matrix product starts).
//
// Following the method: operation, forwarding and one step per hop. Own
// choices: valid bits on the channels, registered outputs, synchronous clear.
module ips_pe
  import systolic_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  dtok_t a_i,
  input  dtok_t b_i,
  input  ctok_t c_i,
  output dtok_t a_o,
  output dtok_t b_o,
  output ctok_t c_o,
  output logic  active
);

  assign active = a_i.v && b_i.v;

  acc_t c_next;
  always_comb begin
    c_next = c_i.d;
    if (active) c_next = c_i.d + ip_mul(a_i.d, b_i.d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_o <= '0;
      b_o <= '0;
      c_o <= '0;
    end else if (clr) begin
      a_o <= '0;
      b_o <= '0;
      c_o <= '0;
    end else begin
      a_o   <= a_i;
      b_o   <= b_i;
      c_o.v <= c_i.v;
      c_o.d <= c_next;
    end
  end

  // An operation needs the c element it updates to be present.
  a_c_present : assert property (@(posedge clk) disable iff (!rst_n)
                                 active |-> c_i.v);

endmodule
