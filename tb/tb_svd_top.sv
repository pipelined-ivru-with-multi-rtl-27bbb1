// tb_svd_top: end-to-end test of the Jacobi SVD unit at its default size
// (8 x 8 matrix, 16-bit elements, default rotation limit).
//
// Each case loads a symmetric matrix, starts a run and compares the sorted
// diagonal the unit returns with eigenvalues computed here in floating
// point by a cyclic Jacobi method. The cases are
//   * random correlation matrices A = X^T X / 8 (positive semi-definite);
//   * random symmetric matrices with negative eigenvalues;
//   * a matrix whose first pivot gives the rotation unit the 45 degree
//     vector x = y, so its loop converges after one pass;
//   * an already diagonal matrix (no rotation may happen);
//   * a run with threshold 0, which can only end at the rotation limit.
// The rows of the accumulated rotation matrix V are collected and checked
// as eigenvectors: A V = V D to within a tolerance, and V^T V = I.
// It counts how often each mechanism happened (bank conflict in the ADSU,
// early IVRU convergence, threshold termination, rotation-limit
// termination) and counts a failure for one that never happened. Also
// checked: the trace is preserved, and a run's cycle count is at least the
// minimum the schedule allows per rotation.
module tb_svd_top;
  localparam int N  = 8;
  localparam int DW = 16;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 ld_valid = 1'b0;
  logic                 ld_ready;
  logic [N-1:0][DW-1:0] ld_row = '0;
  logic                 start = 1'b0;
  logic [DW-1:0]        threshold = '0;
  logic                 busy, done, converged, out_valid;
  logic [N-1:0][DW-1:0] out_diag;
  logic                 vec_valid;
  logic [2:0]           vec_row;
  logic [N-1:0][DW-1:0] vec_data;
  logic [DW-1:0]        off_max;
  logic [31:0]          stat_rotations, stat_conflicts, stat_ivru_early;

  svd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_conflict = 0, n_early = 0, n_thresh_end = 0, n_limit_end = 0;
  int unsigned cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  a   [N][N];
  int  vmat [N][N];
  int  vbeats = 0;
  bit  out_seen = 1'b0;
  always @(posedge clk) if (out_valid) out_seen <= 1'b1;
  always @(posedge clk)
    if (vec_valid) begin
      for (int j = 0; j < N; j++) vmat[vec_row][j] <= int'($signed(vec_data[j]));
      vbeats <= vbeats + 1;
    end
  real ref_eig [N];

  // floating-point cyclic Jacobi reference
  task automatic reference_eigs();
    real m [N][N];
    real th, c, s, mpk, mqk, off;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) m[i][j] = real'(a[i][j]);
    for (int sweep = 0; sweep < 60; sweep++) begin
      off = 0.0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) if (i != j) off += m[i][j]*m[i][j];
      if (off < 1e-18) break;
      for (int p = 0; p < N-1; p++)
        for (int q = p+1; q < N; q++) begin
          if (m[p][q] != 0.0) begin
            th = 0.5 * $atan2(2.0*m[p][q], m[p][p] - m[q][q]);
            c = $cos(th); s = $sin(th);
            for (int k = 0; k < N; k++) begin   // rows
              mpk = m[p][k]; mqk = m[q][k];
              m[p][k] =  c*mpk + s*mqk;
              m[q][k] = -s*mpk + c*mqk;
            end
            for (int k = 0; k < N; k++) begin   // columns
              mpk = m[k][p]; mqk = m[k][q];
              m[k][p] =  c*mpk + s*mqk;
              m[k][q] = -s*mpk + c*mqk;
            end
          end
        end
    end
    for (int i = 0; i < N; i++) ref_eig[i] = m[i][i];
    ref_eig.sort();
  endtask

  task automatic load_matrix();
    for (int r = 0; r < N; r++) begin
      for (int j = 0; j < N; j++) ld_row[j] = DW'(a[r][j]);
      ld_valid = 1'b1;
      @(posedge clk);
      while (!ld_ready) @(posedge clk);
      #1;
    end
    ld_valid = 1'b0;
  endtask

  // run one case; tol is the allowed eigenvalue error in LSBs
  task automatic run_case(string name, int thr, int tol, bit expect_conv);
    real got [N];
    real tr_in, tr_out, err, maxerr;
    int unsigned t0, dt;
    reference_eigs();
    load_matrix();
    threshold = DW'(thr);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    t0 = cycles;
    vbeats = 0;
    out_seen = 1'b0;
    while (!done) begin @(posedge clk); #1; end
    dt = cycles - t0;
    @(posedge clk); #1;   // let the last V row be collected
    tr_in = 0.0; tr_out = 0.0;
    for (int i = 0; i < N; i++) begin
      got[i] = real'($signed(out_diag[i]));
      tr_in  += real'(a[i][i]);
      tr_out += got[i];
    end
    got.sort();
    maxerr = 0.0;
    for (int i = 0; i < N; i++) begin
      err = got[i] - ref_eig[i];
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
    end
    checks++;
    if (!out_seen || maxerr > real'(tol)) begin
      failures++;
      $display("FAIL %s: eigenvalue error %f > %0d (out_valid seen=%b)", name, maxerr, tol, out_seen);
      for (int i = 0; i < N; i++) $display("   got %f  ref %f", got[i], ref_eig[i]);
    end
    checks++;
    err = tr_out - tr_in; if (err < 0) err = -err;
    if (err > real'(tol)) begin
      failures++;
      $display("FAIL %s: trace %f -> %f", name, tr_in, tr_out);
    end
    checks++;
    if (converged != expect_conv) begin
      failures++;
      $display("FAIL %s: converged=%b expected %b", name, converged, expect_conv);
    end
    checks++;
    if (converged && int'(off_max) >= thr) begin
      failures++;
      $display("FAIL %s: off_max %0d not below threshold %0d", name, off_max, thr);
    end
    // eigenvectors
    begin
      real res, orth, d, maxres, maxorth, lmax, vscale;
      lmax = 0.0;
      for (int i = 0; i < N; i++) begin
        d = ref_eig[i]; if (d < 0) d = -d;
        if (d > lmax) lmax = d;
      end
      maxres = 0.0; maxorth = 0.0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          res = 0.0; orth = 0.0;
          for (int k = 0; k < N; k++) begin
            res  += real'(a[i][k]) * real'(vmat[k][j]);
            orth += real'(vmat[k][i]) * real'(vmat[k][j]);
          end
          res = (res - real'($signed(out_diag[j])) * real'(vmat[i][j])) / 16384.0;
          if (res < 0) res = -res;
          orth = orth / (16384.0 * 16384.0) - ((i == j) ? 1.0 : 0.0);
          if (orth < 0) orth = -orth;
          if (res > maxres) maxres = res;
          if (orth > maxorth) maxorth = orth;
        end
      checks++;
      if (vbeats != N) begin
        failures++;
        $display("FAIL %s: %0d eigenvector rows received", name, vbeats);
      end
      checks++;
      // a run forced to the rotation limit keeps rotating on rounding
      // noise, and V slowly loses orthogonality: allow three times more
      vscale = expect_conv ? 1.0 : 3.0;
      if (maxres > vscale * (0.01 * lmax + 8.0) || maxorth > vscale * 0.01) begin
        failures++;
        $display("FAIL %s: eigenvector residual %f (limit %f), orthogonality error %f", name,
                 maxres, vscale * (0.01 * lmax + 8.0), maxorth);
      end
      $display("%s: |AV-VD| max %f, |V'V-I| max %f", name, maxres, maxorth);
    end
    // a rotation needs at least 8 scan batches of 4 cycles and
    // 2*(N/2)*2 update batches: more than 60 cycles
    checks++;
    if (dt < stat_rotations * 60) begin
      failures++;
      $display("FAIL %s: %0d cycles for %0d rotations is too fast", name, dt, stat_rotations);
    end
    if (stat_conflicts > 0)  n_conflict++;
    if (stat_ivru_early > 0) n_early++;
    if (converged) n_thresh_end++; else n_limit_end++;
    $display("%s: rotations=%0d cycles=%0d conflicts=%0d ivru_early=%0d max_err=%f conv=%b",
             name, stat_rotations, dt, stat_conflicts, stat_ivru_early, maxerr, converged);
  endtask

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  initial begin
    int x [N][N];
    void'($urandom(32'd12345));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // random correlation matrices
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) x[i][j] = rnd(-40, 40);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          int acc;
          acc = 0;
          for (int k = 0; k < N; k++) acc += x[k][i] * x[k][j];
          a[i][j] = acc / 8;
        end
      run_case($sformatf("corr%0d", t), 2, 16, 1'b1);
    end

    // random symmetric matrices
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < N; i++)
        for (int j = i; j < N; j++) begin
          a[i][j] = rnd(-900, 900);
          a[j][i] = a[i][j];
        end
      run_case($sformatf("sym%0d", t), 2, 16, 1'b1);
    end

    // 45 degree pivot: a00 - a11 = 2*a01
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) a[i][j] = 0;
    for (int i = 0; i < N; i++) a[i][i] = 100 + 37*i;
    a[0][0] = 500; a[1][1] = 300; a[0][1] = 100; a[1][0] = 100;
    a[2][5] = 20;  a[5][2] = 20;
    run_case("pivot45", 2, 8, 1'b1);

    // already diagonal
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) a[i][j] = (i == j) ? 50*i - 170 : 0;
    run_case("diagonal", 1, 0, 1'b1);
    checks++;
    if (stat_rotations != 0) begin
      failures++;
      $display("FAIL diagonal: %0d rotations", stat_rotations);
    end

    // threshold 0: ends at the rotation limit
    for (int i = 0; i < N; i++)
      for (int j = i; j < N; j++) begin
        a[i][j] = rnd(-500, 500);
        a[j][i] = a[i][j];
      end
    run_case("limit", 0, 24, 1'b0);
    checks++;
    if (stat_rotations != 1024) begin
      failures++;
      $display("FAIL limit: %0d rotations, expected 1024", stat_rotations);
    end

    // every mechanism must have happened
    checks++; if (n_conflict   == 0) begin failures++; $display("FAIL: no ADSU bank conflict"); end
    checks++; if (n_early      == 0) begin failures++; $display("FAIL: no early IVRU convergence"); end
    checks++; if (n_thresh_end == 0) begin failures++; $display("FAIL: no threshold termination"); end
    checks++; if (n_limit_end  == 0) begin failures++; $display("FAIL: no rotation-limit termination"); end
    $display("mechanisms: conflict_runs=%0d early_runs=%0d threshold_ends=%0d limit_ends=%0d",
             n_conflict, n_early, n_thresh_end, n_limit_end);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
