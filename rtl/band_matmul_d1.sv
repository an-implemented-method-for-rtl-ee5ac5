// band_matmul_d1: first design, a band matrix multiplier with one
// processor per element of the band of C and C held in place.
//
// Computes C = A * B for n x n band matrices (A with band widths PA/QA, B
// with PB/QB). The inner product step (i:j:k) runs at step i+j+k on the
// processor at place (i,j), so there is a processor for every (i,j) in the
// band of C (PA+PB above and QA+QB below the diagonal) and the array grows
// with n. c(i,j) stays in its processor; every step a moves by (0,+1),
// along row i, and b by (+1,0), along column j. In step t the elements lie
// at a(i,k): (i, t-i-k) and b(k,j): (t-j-k, j). Row i of processors starts
// at column max(0, i-(QA+QB)) and column j at row max(0, j-(PA+PB)); the
// feeders inject an element there in the step in which its position
// reaches that processor, and only elements inside the band, so steps that
// would involve off-band (zero) elements never happen. A processor that
// receives an a and a b in the same step multiplies them into its c.
// Operations occupy steps 0 .. 3n-3, which is also the whole run: nothing
// has to enter before the first step or leave after the last.
//
// Interface: on start the matrices a_mat and b_mat are latched (elements
// outside the band are ignored) and every c is set to zero. One clock cycle
// per step from 0 to 3n-3, then done rises and c_mat, read directly from
// the processors, holds the product (elements outside the band of C read
// zero). step is the current step number, ops the number of processors
// executing an inner product step in it, fwds the number of processors
// that hold data but only forward it.
//
// Following the method: step, place, flow, layout, processor count. Own
// choices: valid bits, the latched input matrices, and reading the results
// in parallel from the processors (how C leaves the array is not given).
module band_matmul_d1
  import systolic_pkg::*;
#(
  parameter int N  = 4,
  parameter int PA = 1,
  parameter int QA = 1,
  parameter int PB = 1,
  parameter int QB = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  data_t          a_mat [N][N],
  input  data_t          b_mat [N][N],
  output acc_t           c_mat [N][N],
  output logic           busy,
  output logic           done,
  output step_t          step,
  output logic [15:0]    ops,
  output logic [15:0]    fwds
);

  localparam int PC      = PA + PB;
  localparam int QC      = QA + QB;
  localparam int T_BEGIN = 0;
  localparam int T_END   = 3 * (N - 1);

  logic load, run;

  step_sequencer #(.T_BEGIN(T_BEGIN), .T_END(T_END)) u_seq (
    .clk, .rst_n, .start, .load, .run, .done, .step
  );
  assign busy = run;

  data_t a_q [N][N];
  data_t b_q [N][N];

  always_ff @(posedge clk) begin
    if (load) begin
      a_q <= a_mat;
      b_q <= b_mat;
    end
  end

  // Channels, indexed [i][j] by place.
  dtok_t a_out [N][N];
  dtok_t b_out [N][N];
  acc_t  acc   [N][N];
  logic  act   [N][N];
  logic  fwd   [N][N];

  dtok_t a_feed [N];  // into the first processor of row i
  dtok_t b_feed [N];  // into the first processor of column j

  always_comb begin
    int t, k, j0, i0;
    t = int'(step);
    k = 0;
    a_feed = '{default: '0};
    b_feed = '{default: '0};
    for (int i = 0; i < N; i++) begin
      // a(i,k) reaches column j0 in step t = i + j0 + k.
      j0 = imax(0, i - QC);
      k  = t - i - j0;
      if (run && in_band(i, k, PA, QA, N)) begin
        a_feed[i].v = 1'b1;
        a_feed[i].d = a_q[i][k];
      end
    end
    for (int j = 0; j < N; j++) begin
      // b(k,j) reaches row i0 in step t = i0 + j + k.
      i0 = imax(0, j - PC);
      k  = t - j - i0;
      if (run && in_band(k, j, PB, QB, N)) begin
        b_feed[j].v = 1'b1;
        b_feed[j].d = b_q[k][j];
      end
    end
  end

  for (genvar gi = 0; gi < N; gi++) begin : g_i
    for (genvar gj = 0; gj < N; gj++) begin : g_j
      if (in_band(gi, gj, PC, QC, N)) begin : g_pe
        dtok_t ai, bi;
        if (gj > 0 && in_band(gi, gj - 1, PC, QC, N)) begin : g_a_link
          assign ai = a_out[gi][gj-1];
        end else begin : g_a_edge
          assign ai = a_feed[gi];
        end
        if (gi > 0 && in_band(gi - 1, gj, PC, QC, N)) begin : g_b_link
          assign bi = b_out[gi-1][gj];
        end else begin : g_b_edge
          assign bi = b_feed[gj];
        end

        ips_pe_stat u_pe (
          .clk, .rst_n, .clr(load),
          .a_i(ai), .b_i(bi),
          .a_o(a_out[gi][gj]), .b_o(b_out[gi][gj]),
          .acc(acc[gi][gj]), .active(act[gi][gj])
        );
        assign fwd[gi][gj] = (ai.v || bi.v) && !act[gi][gj];
      end else begin : g_none
        // No processor: no step is ever placed here.
        assign a_out[gi][gj] = '0;
        assign b_out[gi][gj] = '0;
        assign acc[gi][gj]   = '0;
        assign act[gi][gj]   = 1'b0;
        assign fwd[gi][gj]   = 1'b0;
      end
    end
  end

  assign c_mat = acc;

  always_comb begin
    ops  = '0;
    fwds = '0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        ops  = ops + 16'(act[i][j]);
        fwds = fwds + 16'(fwd[i][j]);
      end
    end
  end

endmodule
