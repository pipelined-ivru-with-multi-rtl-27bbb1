// tb_ivru: self-checking test of the iterative vector rotation unit.
//
// For random (x, y) over the full 17-bit input range and for small vectors,
// the rotation angle theta = atan(y / x) / 2 (theta = +-pi/4 when x = 0) is
// computed here in floating point, and c, s and theta from the unit are
// compared with round(cos(theta) * 2^14), round(sin(theta) * 2^14) and
// theta * 2^16. Tolerances: 4 LSB on c and s and 8 LSB on theta for
// vectors of length >= 256, looser for short vectors whose angle the
// integer inputs only coarsely define. Also checked: the cycle count from
// start to done is 1 + passes + ROT_ITER/MB (= passes + 9), the pass count
// never exceeds VEC_ITER, `early` is set exactly when the loop stopped
// before VEC_ITER, the 45 degree vector x = y converges after one pass and
// y = 0 needs no pass.
module tb_ivru;
  localparam int DW = 16;
  localparam int XW = DW + 1;

  logic                    clk = 1'b0, rst_n = 1'b0;
  logic                    start = 1'b0;
  logic signed [XW-1:0]    x_in = '0, y_in = '0;
  logic                    busy, done, early_o;
  logic signed [DW-1:0]    cos_o, sin_o;
  logic signed [19:0]      theta_o;
  logic [4:0]              passes_o;

  ivru #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_early = 0, n_full = 0;
  real worst_cs = 0.0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979323846;

  task automatic run(int x, int y);
    real th, ec, es, e1, e2, e3, tol_cs, tol_th;
    int cyc;
    @(negedge clk);
    x_in = XW'(x);
    y_in = XW'(y);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    if (x == 0) th = (y > 0) ? PI/4 : ((y < 0) ? -PI/4 : 0.0);
    else        th = 0.5 * $atan(real'(y) / real'(x));
    ec = $cos(th) * 16384.0;
    es = $sin(th) * 16384.0;
    e1 = real'(cos_o) - ec;  if (e1 < 0) e1 = -e1;
    e2 = real'(sin_o) - es;  if (e2 < 0) e2 = -e2;
    e3 = real'(theta_o) - th * 65536.0; if (e3 < 0) e3 = -e3;
    if ((x*x + y*y) >= 65536) begin tol_cs = 4.0; tol_th = 8.0; end
    else begin tol_cs = 40.0; tol_th = 150.0; end
    if ((x*x + y*y) >= 65536 && e1 > worst_cs) worst_cs = e1;
    if ((x*x + y*y) >= 65536 && e2 > worst_cs) worst_cs = e2;
    checks++;
    if (e1 > tol_cs || e2 > tol_cs || e3 > tol_th) begin
      failures++;
      $display("FAIL x=%0d y=%0d: c=%0d s=%0d theta=%0d expected %f %f %f", x, y,
               cos_o, sin_o, theta_o, ec, es, th * 65536.0);
    end
    checks++;
    if (cyc != int'(passes_o) + 9 || passes_o > 16) begin
      failures++;
      $display("FAIL x=%0d y=%0d: %0d cycles for %0d passes", x, y, cyc, passes_o);
    end
    checks++;
    if (early_o != (passes_o < 16)) begin
      failures++;
      $display("FAIL x=%0d y=%0d: early=%b with %0d passes", x, y, early_o, passes_o);
    end
    if (early_o) n_early++; else n_full++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // special vectors
    run(1000, 1000);
    checks++; if (passes_o != 1) begin failures++; $display("FAIL: x=y took %0d passes", passes_o); end
    run(-600, -600);
    checks++; if (passes_o != 1) begin failures++; $display("FAIL: x=y<0 took %0d passes", passes_o); end
    run(1234, 0);
    checks++; if (passes_o != 0) begin failures++; $display("FAIL: y=0 took %0d passes", passes_o); end
    run(-1234, 0);
    run(0, 700);
    run(0, -700);
    run(65535, 65535);
    run(-65536, 65535);
    run(65535, -65536);
    // random vectors
    for (int t = 0; t < 600; t++) begin
      int x, y;
      x = int'($urandom % 131072) - 65536;
      y = int'($urandom % 131072) - 65536;
      if (t % 4 == 0) begin x = x / 512; y = y / 512; end
      run(x, y);
    end
    checks++;
    if (n_early == 0 || n_full == 0) begin failures++; $display("FAIL: loop exit kinds not both seen"); end
    $display("early exits %0d, full-length loops %0d, worst c/s error %f LSB", n_early, n_full, worst_cs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
