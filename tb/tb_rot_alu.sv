// tb_rot_alu: self-checking test of the rotation adders and multipliers.
//
// Drives random coefficients and element pairs, including full-scale
// values that must saturate, and compares u' = c*u + s*v and
// v' = c*v - s*u, rounded (half up) from Q1.14 and saturated to 16 bits,
// with values computed here. Checks the one-cycle latency of out_valid.
module tb_rot_alu;
  localparam int L = 2, DW = 16;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  in_valid = 1'b0, out_valid;
  logic signed [DW-1:0]  c = '0, s = '0;
  logic [L-1:0][DW-1:0]  u = '0, v = '0, u_out, v_out;

  rot_alu #(.L(L), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_val(longint a, longint b, longint cc, longint ss);
    longint acc, r;
    acc = cc*a + ss*b;
    r = (acc + 8192);
    r = (r >= 0) ? r / 16384 : -((-r + 16383) / 16384);  // floor division
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    longint eu [L], ev [L];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      c = DW'($urandom_range(0, 32767) - 16384);
      s = DW'($urandom_range(0, 32767) - 16384);
      if (t % 5 == 0) begin c = 16'sd16384; s = 16'sd16384; end
      for (int k = 0; k < L; k++) begin
        u[k] = (t % 7 == 0) ? 16'h7fff : DW'($urandom);
        v[k] = (t % 7 == 0) ? 16'h8000 : DW'($urandom);
        eu[k] = expect_val(longint'($signed(u[k])), longint'($signed(v[k])), longint'(c), longint'(s));
        ev[k] = expect_val(longint'($signed(v[k])), longint'($signed(u[k])), longint'(c), -longint'(s));
      end
      @(posedge clk); #1;
      in_valid = 1'b0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL t=%0d: out_valid low", t); end
      for (int k = 0; k < L; k++) begin
        checks++;
        if (longint'($signed(u_out[k])) != eu[k] || longint'($signed(v_out[k])) != ev[k]) begin
          failures++;
          $display("FAIL t=%0d lane %0d: got %0d,%0d expected %0d,%0d", t, k,
                   $signed(u_out[k]), $signed(v_out[k]), eu[k], ev[k]);
        end
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL t=%0d: out_valid stuck", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
