// band_matmul_d3: third design, the band matrix multiplier in which the
// inner products are accumulated with k counting down.
//
// Same problem, processor layout and channels for a and b as the second
// design, but the program behind it runs each inner product from its last
// term to its first. The inner product step (i:j:k) runs at step i+j-k on
// the processor at place (i-k, j-k), x = i-k from -PA to QA and y = j-k
// from -QB to PB: (PA+QA+1) x (PB+QB+1) processors whatever n is. Every
// step a moves by (0,+1), b by (+1,0) and c by (+1,+1), so a, b and c now
// all move towards larger coordinates. In step t the elements lie at
// a(i,k): (i-k, t-i), b(k,j): (t-j, j-k), c(i,j): (t-j, t-i). All a
// elements of row i of A thus enter the array in the same step, one per
// column, and channels carry an element in every step instead of every
// third. Operations occupy steps -min(PA,QB) .. n-1+min(QA,PB): n +
// min(PA,QB) + min(QA,PB) steps instead of the 3n-2 of the other designs.
// Each c(i,j) of the band of C enters as a zero-valued token where its
// diagonal x-y = i-j begins (x = -PA or y = -QB) and leaves where it ends
// (x = QA or y = PB), where the collector writes it into the result matrix.
//
// Interface: on start the matrices a_mat and b_mat are latched (elements
// outside the band are ignored). One clock cycle per step from T_BEGIN to
// T_END, then done rises and c_mat holds the product (elements outside the
// band of C read zero). step is the current step number, ops the number of
// processors executing an inner product step in it, fwds the number of
// processors that hold data but only forward it.
//
// Following the method: step, place, flow, layout and processor count.
// Own choices: valid bits, the latched input matrices, the result matrix
// register. For the 4 x 4 tridiagonal example the run covers steps -1..5
// (7 cycles): operations in steps -1..4 and the last c stored in step 5;
// the first and last operations happen on boundary processors, so no step
// is spent soaking or draining.
module band_matmul_d3
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

  localparam int NX      = PA + QA + 1;
  localparam int NY      = PB + QB + 1;
  // Run window: from the earliest step in which an element enters the
  // array to one step after the last c element leaves it, both worked out
  // from step, place and flow.
  function automatic int first_entry();
    int t;
    t = 1 << 20;
    for (int r = 0; r < N; r++) begin
      for (int q = 0; q < N; q++) begin
        // a(r,q) enters at y = -QB in step r-QB; b(r,q) at x = -PA in q-PA
        if (in_band(r, q, PA, QA, N)) t = imin(t, r - QB);
        if (in_band(r, q, PB, QB, N)) t = imin(t, q - PA);
        // c(r,q) is at (t-q, t-r): it enters once x >= -PA and y >= -QB
        if (in_band(r, q, PA + PB, QA + QB, N))
          t = imin(t, imax(q - PA, r - QB));
      end
    end
    return t;
  endfunction

  function automatic int last_exit();
    int t;
    t = -(1 << 20);
    for (int r = 0; r < N; r++)
      for (int q = 0; q < N; q++)
        // c(r,q) leaves after the last step with x <= QA and y <= PB
        if (in_band(r, q, PA + PB, QA + QB, N))
          t = imax(t, imin(q + QA, r + PB));
    return t;
  endfunction

  localparam int T_BEGIN = first_entry();
  localparam int T_END   = last_exit() + 1;

  logic load, run;

  step_sequencer #(.T_BEGIN(T_BEGIN), .T_END(T_END)) u_seq (
    .clk, .rst_n, .start, .load, .run, .done, .step
  );
  assign busy = run;

  // Input matrices, latched on start.
  data_t a_q [N][N];
  data_t b_q [N][N];

  always_ff @(posedge clk) begin
    if (load) begin
      a_q <= a_mat;
      b_q <= b_mat;
    end
  end

  // Channels between processors, indexed [x+PA][y+QB].
  dtok_t a_out [NX][NY];
  dtok_t b_out [NX][NY];
  ctok_t c_out [NX][NY];
  logic  act   [NX][NY];
  logic  fwd   [NX][NY];

  // Boundary feeds.
  dtok_t a_feed [NX];
  dtok_t b_feed [NY];
  ctok_t c_feed [NX][NY];

  always_comb begin
    int t, x, y, i, j, k;
    t = int'(step);
    x = 0; y = 0; i = 0; j = 0; k = 0;
    a_feed = '{default: '0};
    b_feed = '{default: '0};
    c_feed = '{default: '0};
    // a(i,k) enters column x = i-k at y = -QB in step t = i - QB.
    for (int gx = 0; gx < NX; gx++) begin
      x = gx - PA;
      if (run) begin
        i = t + QB;
        k = i - x;
        if (in_band(i, k, PA, QA, N)) begin
          a_feed[gx].v = 1'b1;
          a_feed[gx].d = a_q[i][k];
        end
      end
    end
    // b(k,j) enters row y = j-k at x = -PA in step t = j - PA.
    for (int gy = 0; gy < NY; gy++) begin
      y = gy - QB;
      if (run) begin
        j = t + PA;
        k = j - y;
        if (in_band(k, j, PB, QB, N)) begin
          b_feed[gy].v = 1'b1;
          b_feed[gy].d = b_q[k][j];
        end
      end
    end
    // c(i,j) is at (x,y) in step t when j = t-x and i = t-y.
    for (int gx = 0; gx < NX; gx++) begin
      for (int gy = 0; gy < NY; gy++) begin
        x = gx - PA;
        y = gy - QB;
        if (run && (gx == 0 || gy == 0)) begin
          i = t - y;
          j = t - x;
          c_feed[gx][gy].v = in_band(i, j, PA + PB, QA + QB, N);
        end
      end
    end
  end

  for (genvar gx = 0; gx < NX; gx++) begin : g_x
    for (genvar gy = 0; gy < NY; gy++) begin : g_y
      dtok_t ai, bi;
      ctok_t ci;
      if (gy == 0) begin : g_a_edge
        assign ai = a_feed[gx];
      end else begin : g_a_link
        assign ai = a_out[gx][gy-1];
      end
      if (gx == 0) begin : g_b_edge
        assign bi = b_feed[gy];
      end else begin : g_b_link
        assign bi = b_out[gx-1][gy];
      end
      if (gx == 0 || gy == 0) begin : g_c_edge
        assign ci = c_feed[gx][gy];
      end else begin : g_c_link
        assign ci = c_out[gx-1][gy-1];
      end

      ips_pe u_pe (
        .clk, .rst_n, .clr(load),
        .a_i(ai), .b_i(bi), .c_i(ci),
        .a_o(a_out[gx][gy]), .b_o(b_out[gx][gy]), .c_o(c_out[gx][gy]),
        .active(act[gx][gy])
      );
      assign fwd[gx][gy] = (ai.v || bi.v || ci.v) && !act[gx][gy];
    end
  end

  // Result collection: a c token leaving an exit processor in step t-1
  // is c(i,j) with j = t-1-x and i = t-1-y.
  always_ff @(posedge clk) begin
    int t1, x, y, i, j;
    if (load) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          c_mat[r][c] <= '0;
    end else if (run) begin
      t1 = int'(step) - 1;
      for (int gx = 0; gx < NX; gx++) begin
        for (int gy = 0; gy < NY; gy++) begin
          x = gx - PA;
          y = gy - QB;
          i = t1 - y;
          j = t1 - x;
          if ((gx == NX - 1 || gy == NY - 1) && c_out[gx][gy].v &&
              in_band(i, j, PA + PB, QA + QB, N))
            c_mat[i][j] <= c_out[gx][gy].d;
        end
      end
    end
  end

  always_comb begin
    ops  = '0;
    fwds = '0;
    for (int gx = 0; gx < NX; gx++) begin
      for (int gy = 0; gy < NY; gy++) begin
        ops  = ops + 16'(act[gx][gy]);
        fwds = fwds + 16'(fwd[gx][gy]);
      end
    end
  end

endmodule
