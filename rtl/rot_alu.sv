// rot_alu: the adders and multipliers that apply a plane rotation to pairs
// of matrix elements.
//
// For every lane k with the pair (u_k, v_k) it computes
//     u'_k =  c*u_k + s*v_k
//     v'_k = -s*u_k + c*v_k
// with c, s the rotation coefficients in signed Q1.14. Products are summed
// at full width, rounded to nearest (half up) and saturated to DW bits.
// Applied to rows p, q (u = a_pk, v = a_qk) this is the left rotation
// R^T A; applied to columns p, q (u = a_kp, v = a_kq) it is the right
// rotation A R. The design names this block only as adders and multipliers
// fed by the rotation unit; the lane count, rounding and saturation are
// this design's choices.
//
// Timing: one register stage. out_valid and the results follow in_valid and
// its operands by one clock cycle.
module rot_alu #(
  parameter int L    = 2,                      // element pairs per cycle
  parameter int DW   = svd_pkg::DATA_WIDTH,
  parameter int FRAC = svd_pkg::COEF_FRAC
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [DW-1:0]       c,
  input  logic signed [DW-1:0]       s,
  input  logic [L-1:0][DW-1:0]       u,
  input  logic [L-1:0][DW-1:0]       v,
  output logic                       out_valid,
  output logic [L-1:0][DW-1:0]       u_out,
  output logic [L-1:0][DW-1:0]       v_out
);

  localparam int PW = 2*DW + 2;  // product-sum width

  function automatic logic [DW-1:0] round_sat(input logic signed [PW-1:0] acc);
    logic signed [PW-1:0] r;
    r = (acc + (PW'(1) <<< (FRAC-1))) >>> FRAC;
    if (r > PW'(2**(DW-1) - 1))    return {1'b0, {(DW-1){1'b1}}};
    if (r < -PW'(2**(DW-1)))       return {1'b1, {(DW-1){1'b0}}};
    return r[DW-1:0];
  endfunction

  logic [L-1:0][DW-1:0] u_n, v_n;

  always_comb begin
    for (int k = 0; k < L; k++) begin
      logic signed [PW-1:0] pu, pv;
      pu = PW'(c * $signed(u[k])) + PW'(s * $signed(v[k]));
      pv = PW'(c * $signed(v[k])) - PW'(s * $signed(u[k]));
      u_n[k] = round_sat(pu);
      v_n[k] = round_sat(pv);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      u_out     <= '0;
      v_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        u_out <= u_n;
        v_out <= v_n;
      end
    end
  end

endmodule
