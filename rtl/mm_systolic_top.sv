// mm_systolic_top: the three systolic band matrix multipliers side by side.
//
// All three compute C = A * B for n x n band matrices from the same
// program of inner product steps c(i,j) := c(i,j) + a(i,k) * b(k,j); they
// differ in where and when each step runs:
//   d1  step i+j+k, place (i,j):     one processor per element of the band
//       of C, c stationary; 3n-2 steps.
//   d2  step i+j+k, place (i-k,j-k): (PA+QA+1)(PB+QB+1) processors
//       whatever n is, c moving against a and b; 3n-2 steps.
//   d3  step i+j-k, place (i-k,j-k): the same processors, c moving with a
//       and b; n + min(PA,QB) + min(QA,PB) steps.
// Each multiplier has its own start, matrices, results and status, so they
// can run independently or together. Parameters: n (N) and the band widths
// of A (PA above, QA below the diagonal) and B (PB, QB); the defaults are
// the 4 x 4 tridiagonal example worked through for all three designs.
//
// Interface per multiplier dX: dX_start (pulse), dX_a/dX_b (latched on
// start), dX_c (valid while dX_done), dX_busy, dX_step (current step),
// dX_ops (inner product steps executed in that step), dX_fwds (processors
// only forwarding data in that step).
module mm_systolic_top
  import systolic_pkg::*;
#(
  parameter int N  = 4,
  parameter int PA = 1,
  parameter int QA = 1,
  parameter int PB = 1,
  parameter int QB = 1
) (
  input  logic        clk,
  input  logic        rst_n,

  input  logic        d1_start,
  input  data_t       d1_a [N][N],
  input  data_t       d1_b [N][N],
  output acc_t        d1_c [N][N],
  output logic        d1_busy,
  output logic        d1_done,
  output step_t       d1_step,
  output logic [15:0] d1_ops,
  output logic [15:0] d1_fwds,

  input  logic        d2_start,
  input  data_t       d2_a [N][N],
  input  data_t       d2_b [N][N],
  output acc_t        d2_c [N][N],
  output logic        d2_busy,
  output logic        d2_done,
  output step_t       d2_step,
  output logic [15:0] d2_ops,
  output logic [15:0] d2_fwds,

  input  logic        d3_start,
  input  data_t       d3_a [N][N],
  input  data_t       d3_b [N][N],
  output acc_t        d3_c [N][N],
  output logic        d3_busy,
  output logic        d3_done,
  output step_t       d3_step,
  output logic [15:0] d3_ops,
  output logic [15:0] d3_fwds
);

  band_matmul_d1 #(.N(N), .PA(PA), .QA(QA), .PB(PB), .QB(QB)) u_d1 (
    .clk, .rst_n, .start(d1_start), .a_mat(d1_a), .b_mat(d1_b), .c_mat(d1_c),
    .busy(d1_busy), .done(d1_done), .step(d1_step), .ops(d1_ops), .fwds(d1_fwds)
  );

  band_matmul_d2 #(.N(N), .PA(PA), .QA(QA), .PB(PB), .QB(QB)) u_d2 (
    .clk, .rst_n, .start(d2_start), .a_mat(d2_a), .b_mat(d2_b), .c_mat(d2_c),
    .busy(d2_busy), .done(d2_done), .step(d2_step), .ops(d2_ops), .fwds(d2_fwds)
  );

  band_matmul_d3 #(.N(N), .PA(PA), .QA(QA), .PB(PB), .QB(QB)) u_d3 (
    .clk, .rst_n, .start(d3_start), .a_mat(d3_a), .b_mat(d3_b), .c_mat(d3_c),
    .busy(d3_busy), .done(d3_done), .step(d3_step), .ops(d3_ops), .fwds(d3_fwds)
  );

endmodule
