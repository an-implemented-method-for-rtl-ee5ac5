// tb_mm_systolic_top: end-to-end testbench of the three band matrix
// multipliers at their default size (4 x 4, tridiagonal A and B).
//
// Six rounds; in each, all three multipliers get their own random band
// matrices (with random junk outside the bands, which must be ignored) and
// are started at random, independent offsets, so that they run
// concurrently; one round also starts a multiplier again while it is busy
// (the pulse must be ignored). Every product is compared with a reference
// triple loop. The testbench also counts how often each mechanism of the
// designs happened and fails if one never did:
//   ops      inner product steps executed (per design),
//   fwd      processors that only forward data in a step,
//   soak     steps of d2 in which data move into the array before the
//            first operation,
//   drain    steps of d2 in which results move out after the last one
//            (d1 and d3 start and end with operations on boundary
//            processors, so they have neither),
//   junk     off-band input elements that were present and ignored,
//   restart  starts of a multiplier that has finished a previous product,
//   ignored  start pulses given while busy.
// It checks the trace lengths (10 steps with operations for d1 and d2,
// 6 for d3) and the run lengths including soaking and draining (10, 13
// and 7 cycles).
module tb_mm_systolic_top;
  import systolic_pkg::*;

  localparam int N = 4;
  localparam int P = 1;  // band widths of A and B, above and below

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start [3];
  data_t       a [3][N][N];
  data_t       b [3][N][N];
  acc_t        c [3][N][N];
  logic        busy [3];
  logic        done [3];
  step_t       step [3];
  logic [15:0] ops [3];
  logic [15:0] fwds [3];

  mm_systolic_top dut (
    .clk, .rst_n,
    .d1_start(start[0]), .d1_a(a[0]), .d1_b(b[0]), .d1_c(c[0]), .d1_busy(busy[0]),
    .d1_done(done[0]), .d1_step(step[0]), .d1_ops(ops[0]), .d1_fwds(fwds[0]),
    .d2_start(start[1]), .d2_a(a[1]), .d2_b(b[1]), .d2_c(c[1]), .d2_busy(busy[1]),
    .d2_done(done[1]), .d2_step(step[1]), .d2_ops(ops[1]), .d2_fwds(fwds[1]),
    .d3_start(start[2]), .d3_a(a[2]), .d3_b(b[2]), .d3_c(c[2]), .d3_busy(busy[2]),
    .d3_done(done[2]), .d3_step(step[2]), .d3_ops(ops[2]), .d3_fwds(fwds[2])
  );

  int checks = 0, failures = 0;
  int n_ops [3], n_fwd [3], n_soak [3], n_drain [3];
  int n_junk = 0, n_restart = 0, n_ignored = 0;
  int finished [3];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic inb(int r, int cc);
    return cc - r <= P && r - cc <= P;
  endfunction

  function automatic int n_steps_band();
    int n = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        for (int k = 0; k < N; k++)
          if (inb(i, k) && inb(k, j)) n++;
    return n;
  endfunction

  // One product on multiplier d: load, start after `delay` cycles, follow
  // the run step by step, check the result.
  task automatic run_one(input int d, input int delay, input logic poke);
    acc_t cref [N][N];
    int   seen_ops [$];
    int   seen_fwd [$];
    int   first, last, nact, cycles, total;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a[d][i][j] = data_t'($urandom);
        b[d][i][j] = data_t'($urandom);
        if (!inb(i, j)) n_junk += 2;
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        cref[i][j] = '0;
        for (int k = 0; k < N; k++)
          if (inb(i, k) && inb(k, j))
            cref[i][j] += acc_t'(a[d][i][k]) * acc_t'(b[d][k][j]);
      end
    repeat (delay) @(negedge clk);
    if (finished[d] > 0) n_restart++;
    start[d] = 1'b1;
    @(negedge clk);
    start[d] = 1'b0;
    cycles = 0;
    while (busy[d]) begin
      seen_ops.push_back(int'(ops[d]));
      seen_fwd.push_back(int'(fwds[d]));
      if (poke && cycles == 2) begin
        start[d] = 1'b1;  // must be ignored
        n_ignored++;
      end else begin
        start[d] = 1'b0;
      end
      cycles++;
      @(negedge clk);
    end
    start[d] = 1'b0;
    check(done[d], $sformatf("d%0d done", d + 1));
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        check(c[d][i][j] == cref[i][j],
              $sformatf("d%0d c[%0d][%0d] = %0d, expected %0d", d + 1, i, j, c[d][i][j], cref[i][j]));
    first = -1; last = -1; nact = 0; total = 0;
    foreach (seen_ops[s]) begin
      total += seen_ops[s];
      if (seen_ops[s] != 0) begin
        if (first < 0) first = s;
        last = s;
        nact++;
      end
    end
    n_ops[d] += total;
    foreach (seen_fwd[s]) begin
      if (seen_fwd[s] != 0) n_fwd[d]++;
      if (seen_fwd[s] != 0 && s < first) n_soak[d]++;
      if (seen_fwd[s] != 0 && s > last) n_drain[d]++;
    end
    check(nact == ((d == 2) ? N + 2 : 3 * N - 2), $sformatf("d%0d: %0d steps with operations", d + 1, nact));
    check(last - first + 1 == nact, $sformatf("d%0d: steps with operations are contiguous", d + 1));
    // every non-neutral inner product step runs exactly once
    check(total == n_steps_band(),
          $sformatf("d%0d: %0d inner product steps", d + 1, total));
    // d1: steps 0..9. d2: a(0,0), b(0,0), c(0,0) enter in step -1, c(3,3)
    // leaves (-1,-1) in step 10 and is stored in step 11. d3: operations
    // in steps -1..4, c(3,3) leaves (1,1) in step 4 and is stored in 5.
    check(cycles == ((d == 0) ? 10 : (d == 1) ? 13 : 7),
          $sformatf("d%0d run took %0d cycles", d + 1, cycles));
    finished[d]++;
  endtask

  initial begin
    for (int d = 0; d < 3; d++) begin
      start[d] = 1'b0;
      n_ops[d] = 0; n_fwd[d] = 0; n_soak[d] = 0; n_drain[d] = 0; finished[d] = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a[d][i][j] = '0;
          b[d][i][j] = '0;
        end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int r = 0; r < 6; r++) begin
      fork
        run_one(0, $urandom % 4, r == 1);
        run_one(1, $urandom % 4, r == 3);
        run_one(2, $urandom % 4, r == 5);
      join
    end
    for (int d = 0; d < 3; d++) begin
      $display("d%0d: ops=%0d fwd=%0d soak=%0d drain=%0d", d + 1, n_ops[d], n_fwd[d], n_soak[d], n_drain[d]);
      check(n_ops[d] > 0, $sformatf("d%0d executed no inner product step", d + 1));
      check(n_fwd[d] > 0, $sformatf("d%0d never forwarded", d + 1));
      if (d == 1) begin
        check(n_soak[d] > 0, $sformatf("d%0d never soaked", d + 1));
        check(n_drain[d] > 0, $sformatf("d%0d never drained", d + 1));
      end
    end
    $display("junk=%0d restart=%0d ignored=%0d", n_junk, n_restart, n_ignored);
    check(n_junk > 0, "no off-band input");
    check(n_restart > 0, "no restart");
    check(n_ignored > 0, "no start pulse while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
