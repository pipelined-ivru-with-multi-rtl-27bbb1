// tb_pssm: self-checking test of the parallel scan search module.
//
// Feeds random 8 x 8 matrices, one row per beat, sometimes with idle cycles
// between beats, and compares the result with a sequential search done
// here: largest |a_ij| over i < j, the first one in row-major order on a
// tie, |-32768| counted as 32767, and converged = (max < threshold).
// Matrices with many equal values and all-zero matrices exercise the tie
// rules. Checks that res_valid comes exactly one cycle after the last row
// and that `start` discards a partial scan.
module tb_pssm;
  localparam int N = 8, DW = 16, RW = 3;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                start = 1'b0;
  logic [DW-1:0]       threshold = '0;
  logic                in_valid = 1'b0, in_last = 1'b0;
  logic [RW-1:0]       in_row = '0;
  logic [N-1:0][DW-1:0] in_data = '0;
  logic                res_valid, converged;
  logic [DW-1:0]       res_mag;
  logic [RW-1:0]       res_p, res_q;

  pssm #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_conv = 0, n_notconv = 0;
  logic [DW-1:0] m [N][N];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mag(logic [DW-1:0] v);
    int x;
    x = int'($signed(v));
    if (x < 0) x = -x;
    if (x > 32767) x = 32767;
    return x;
  endfunction

  task automatic feed_rows(int upto, bit gaps);
    for (int r = 0; r < upto; r++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_row   = RW'(r);
      in_last  = (r == N-1);
      for (int j = 0; j < N; j++) in_data[j] = m[r][j];
      @(posedge clk); #1;
      in_valid = 1'b0;
      in_last  = 1'b0;
      if (r == N-1) begin
        checks++;
        if (!res_valid) begin failures++; $display("FAIL: res_valid not one cycle after last row"); end
      end else if (gaps) begin
        repeat ($urandom % 3) @(posedge clk);
      end
    end
  endtask

  task automatic check_scan();
    int best, bp, bq;
    best = -1; bp = 0; bq = 0;
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        if (mag(m[i][j]) > best) begin best = mag(m[i][j]); bp = i; bq = j; end
    checks++;
    if (int'(res_mag) != best || int'(res_p) != bp || int'(res_q) != bq ||
        converged != (best < int'(threshold))) begin
      failures++;
      $display("FAIL: got %0d at (%0d,%0d) conv=%b, expected %0d at (%0d,%0d) conv=%b",
               res_mag, res_p, res_q, converged, best, bp, bq, best < int'(threshold));
    end
    if (converged) n_conv++; else n_notconv++;
    @(posedge clk); #1;
    checks++;
    if (res_valid) begin failures++; $display("FAIL: res_valid longer than one cycle"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          unique case (t % 4)
            0: m[i][j] = DW'($urandom);
            1: m[i][j] = DW'($urandom % 5) - 16'd2;               // many ties
            2: m[i][j] = (i == j) ? DW'($urandom) : DW'($urandom % 40) - 16'd20;
            default: m[i][j] = ($urandom % 16 == 0) ? 16'h8000 : DW'($urandom % 300);
          endcase
        end
      if (t == 10) for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) m[i][j] = '0;
      threshold = (t % 2) ? DW'($urandom % 40) : DW'($urandom);
      if (t % 7 == 3) begin
        // a partial scan that must be discarded
        for (int i = 0; i < N; i++) m[0][i] = 16'h7fff;
        feed_rows(3, 1'b0);
        for (int i = 0; i < N; i++) m[0][i] = 16'd1;
        @(negedge clk); start = 1'b1;
        @(posedge clk); #1; start = 1'b0;
      end
      feed_rows(N, t % 3 == 0);
      check_scan();
    end
    checks++;
    if (n_conv == 0 || n_notconv == 0) begin failures++; $display("FAIL: threshold outcome not varied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
