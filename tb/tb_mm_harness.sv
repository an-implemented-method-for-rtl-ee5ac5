// tb_mm_harness: drives one band matrix multiplier (design 1, 2 or 3,
// chosen by DESIGN) through NREP products of random band matrices and
// checks it against an independent model.
//
// Reference model: C is computed by the plain triple loop over the band
// (elements of A and B outside their bands are set to random junk, which
// the multiplier must ignore). The expected number of inner product steps
// in every step is found by enumerating all (i:j:k) whose a and b lie in
// their bands and evaluating the design's step function on them (i+j+k for
// designs 1 and 2, i+j-k for design 3). The harness then checks
//   - every element of C, off-band elements included (must be zero),
//   - the number of operations the multiplier reports in every step,
//   - the processor each operation runs on, read from the multiplier's
//     activity map, against the place function ((i,j) for design 1,
//     (i-k,j-k) for designs 2 and 3),
//   - the first and last step with an operation and the number of steps
//     with operations: 3n-2 for designs 1 and 2, n+min(PA,QB)+min(QA,PB)
//     for design 3,
//   - for the 4 x 4 tridiagonal example, the widths of the parallel
//     commands: 1,3,3,3,3,3,3,3,3,1 (designs 1, 2) and 1,4,8,8,4,1 (3),
//   - for design 1, that the run takes exactly 3n-2 cycles.
// checks/failures count the comparisons; fin rises when all is done.
module tb_mm_harness
  import systolic_pkg::*;
#(
  parameter int DESIGN = 3,
  parameter int N      = 4,
  parameter int PA     = 1,
  parameter int QA     = 1,
  parameter int PB     = 1,
  parameter int QB     = 1,
  parameter int NREP   = 4
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic fin
);

  logic        start;
  data_t       a [N][N];
  data_t       b [N][N];
  acc_t        c [N][N];
  logic        busy, done;
  step_t       step;
  logic [15:0] ops, fwds;

  if (DESIGN == 1) begin : g_d1
    band_matmul_d1 #(.N(N), .PA(PA), .QA(QA), .PB(PB), .QB(QB)) dut (
      .clk, .rst_n, .start, .a_mat(a), .b_mat(b), .c_mat(c),
      .busy, .done, .step, .ops, .fwds);
  end else if (DESIGN == 2) begin : g_d2
    band_matmul_d2 #(.N(N), .PA(PA), .QA(QA), .PB(PB), .QB(QB)) dut (
      .clk, .rst_n, .start, .a_mat(a), .b_mat(b), .c_mat(c),
      .busy, .done, .step, .ops, .fwds);
  end else begin : g_d3
    band_matmul_d3 #(.N(N), .PA(PA), .QA(QA), .PB(PB), .QB(QB)) dut (
      .clk, .rst_n, .start, .a_mat(a), .b_mat(b), .c_mat(c),
      .busy, .done, .step, .ops, .fwds);
  end

  // Places of the processors that execute an operation, seen step by step
  // through the multiplier's internal activity map, as keys (step,x,y).
  longint seen_place [$];

  function automatic longint pkey(int t, int x, int y);
    return ((longint'(t) + 1000) * 1000 + longint'(x) + 500) * 1000 + longint'(y) + 500;
  endfunction

  if (DESIGN == 1) begin : g_mon1
    always @(negedge clk)
      if (busy)
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            if (g_d1.dut.act[i][j]) seen_place.push_back(pkey(int'(step), i, j));
  end else if (DESIGN == 2) begin : g_mon2
    always @(negedge clk)
      if (busy)
        for (int gx = 0; gx < PA + QA + 1; gx++)
          for (int gy = 0; gy < PB + QB + 1; gy++)
            if (g_d2.dut.act[gx][gy]) seen_place.push_back(pkey(int'(step), gx - PA, gy - QB));
  end else begin : g_mon3
    always @(negedge clk)
      if (busy)
        for (int gx = 0; gx < PA + QA + 1; gx++)
          for (int gy = 0; gy < PB + QB + 1; gy++)
            if (g_d3.dut.act[gx][gy]) seen_place.push_back(pkey(int'(step), gx - PA, gy - QB));
  end

  function automatic logic inb(int r, int cc, int p, int q);
    return r >= 0 && r < N && cc >= 0 && cc < N && cc - r <= p && r - cc <= q;
  endfunction

  function automatic int mn(int x, int y);
    return x < y ? x : y;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL design %0d N=%0d: %s", DESIGN, N, what);
    end
  endtask

  acc_t c_ref [N][N];
  int   exp_ops [int];
  int   obs_ops [int];
  int   exp_place [longint];

  initial begin
    int first, last, nsteps, cycles, exp_first, exp_len, s;
    longint pk;
    int widths[$];
    checks = 0; failures = 0; fin = 1'b0; start = 1'b0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a[i][j] = '0;
        b[i][j] = '0;
      end
    wait (rst_n);
    repeat (2) @(posedge clk);
    for (int rep = 0; rep < NREP; rep++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a[i][j] = data_t'($urandom);
          b[i][j] = data_t'($urandom);
          if (rep == 0) begin
            // small values first, for readable failures
            a[i][j] = data_t'(i * N + j + 1);
            b[i][j] = data_t'(j * N + i + 2);
          end
        end
      // reference product over the bands only
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          c_ref[i][j] = '0;
          for (int k = 0; k < N; k++)
            if (inb(i, k, PA, QA) && inb(k, j, PB, QB))
              c_ref[i][j] += acc_t'(a[i][k]) * acc_t'(b[k][j]);
        end
      exp_ops.delete();
      obs_ops.delete();
      exp_place.delete();
      seen_place.delete();
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          for (int k = 0; k < N; k++)
            if (inb(i, k, PA, QA) && inb(k, j, PB, QB)) begin
              s = (DESIGN == 3) ? i + j - k : i + j + k;
              if (exp_ops.exists(s)) exp_ops[s]++;
              else exp_ops[s] = 1;
              // place: (i,j) for design 1, (i-k,j-k) for designs 2 and 3
              pk = (DESIGN == 1) ? pkey(s, i, j) : pkey(s, i - k, j - k);
              if (exp_place.exists(pk)) exp_place[pk]++;
              else exp_place[pk] = 1;
            end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 0;
      while (busy) begin
        obs_ops[int'(step)] = int'(ops);
        cycles++;
        @(negedge clk);
      end
      check(done, "done after the run");
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          check(c[i][j] == c_ref[i][j],
                $sformatf("c[%0d][%0d] = %0d, expected %0d", i, j, c[i][j], c_ref[i][j]));
      // where each operation ran, against the place function; no two
      // operations of one step may share a processor
      foreach (exp_place[key])
        check(exp_place[key] == 1, "two operations of one step on one processor");
      foreach (seen_place[n])
        check(exp_place.exists(seen_place[n]),
              $sformatf("operation at step/place key %0d not in the trace", seen_place[n]));
      check(seen_place.size() == exp_place.size(),
            $sformatf("%0d operations placed, expected %0d", seen_place.size(), exp_place.size()));
      // operations per step, against the enumerated trace
      foreach (exp_ops[st])
        check(obs_ops.exists(st) && obs_ops[st] == exp_ops[st],
              $sformatf("step %0d: %0d operations, expected %0d", st,
                        obs_ops.exists(st) ? obs_ops[st] : -1, exp_ops[st]));
      first = 1 << 30; last = -(1 << 30); nsteps = 0;
      widths.delete();
      foreach (obs_ops[st]) begin
        if (obs_ops[st] != 0) begin
          if (st < first) first = st;
          if (st > last) last = st;
          nsteps++;
          check(exp_ops.exists(st), $sformatf("unexpected operations in step %0d", st));
        end
      end
      for (int st = first; st <= last; st++)
        widths.push_back(obs_ops.exists(st) ? obs_ops[st] : 0);
      exp_first = (DESIGN == 3) ? -mn(PA, QB) : 0;
      exp_len   = (DESIGN == 3) ? N + mn(PA, QB) + mn(QA, PB) : 3 * N - 2;
      check(first == exp_first, $sformatf("first step %0d, expected %0d", first, exp_first));
      check(nsteps == exp_len, $sformatf("%0d steps with operations, expected %0d", nsteps, exp_len));
      check(last - first + 1 == exp_len, $sformatf("trace from %0d to %0d", first, last));
      if (N == 4 && PA == 1 && QA == 1 && PB == 1 && QB == 1) begin
        int pw[$];
        if (DESIGN == 3) pw = {1, 4, 8, 8, 4, 1};
        else             pw = {1, 3, 3, 3, 3, 3, 3, 3, 3, 1};
        check(widths.size() == pw.size(), "number of parallel commands");
        for (int w = 0; w < pw.size() && w < widths.size(); w++)
          check(widths[w] == pw[w], $sformatf("parallel command %0d has width %0d, expected %0d",
                                              w, widths[w], pw[w]));
      end
      if (DESIGN == 1)
        check(cycles == 3 * N - 2, $sformatf("run took %0d cycles, expected %0d", cycles, 3 * N - 2));
      if (rep == 0)
        $display("design %0d N=%0d bands A %0d/%0d B %0d/%0d: run %0d cycles, operations in steps %0d..%0d",
                 DESIGN, N, PA, QA, PB, QB, cycles, first, last);
    end
    fin = 1'b1;
  end

endmodule
