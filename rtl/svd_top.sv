// svd_top: Jacobi SVD unit for an N x N symmetric (correlation) matrix.
//
// Structure: the controller drives the address and data synchronization
// unit (adsu), which is the only path into the multi-bank memory (mbm).
// Rows read for a search go to the parallel scan search module (pssm);
// the pivot values (x, y) go to the iterative vector rotation unit (ivru);
// pairs of matrix elements go through the rotation adders and multipliers
// (rot_alu) and are written back through the adsu. This is the block
// arrangement of the design description, with the data that the
// description shows passing directly between blocks routed through the
// controller, which owns all sequencing.
//
// Use: after reset, present the matrix as N row beats on ld_valid/ld_row
// (row 0 first; a beat is taken when ld_ready is high). Pulse `start` with
// `threshold` set. While busy, the unit repeatedly finds the largest
// off-diagonal |a_pq|, computes and applies the rotation, until that
// magnitude is below threshold or MAX_ROT rotations have been applied. It
// then pulses out_valid with the diagonal (the eigenvalues, whose
// magnitudes are the singular values) on out_diag, and `converged` tells
// which of the two ended the run; off_max gives the largest off-diagonal
// magnitude found by the last scan. Next, the N rows of the accumulated
// rotation matrix V (Q1.14) come out on vec_row/vec_data, one per vec_valid
// beat; column j of V is the eigenvector (singular vector) of out_diag[j].
// `done` pulses with the last row. The memory then holds the (nearly)
// diagonal matrix and V; loading new rows overwrites the matrix.
// The memory holds two N x N matrices (A and V) in N banks of 2N words.
// Elements are signed DW-bit integers. Keep |a_ij| well below 2^(DW-2) so
// the rotated values cannot saturate.
module svd_top #(
  parameter int N       = svd_pkg::N,
  parameter int DW      = svd_pkg::DATA_WIDTH,
  parameter int RL      = 2,
  parameter int MAX_ROT = 1024,
  localparam int RW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ld_valid,
  output logic                 ld_ready,
  input  logic [N-1:0][DW-1:0] ld_row,
  input  logic                 start,
  input  logic [DW-1:0]        threshold,
  output logic                 busy,
  output logic                 done,
  output logic                 converged,
  output logic                 out_valid,
  output logic [N-1:0][DW-1:0] out_diag,
  output logic                 vec_valid,    // one row of V per beat
  output logic [RW-1:0]        vec_row,
  output logic [N-1:0][DW-1:0] vec_data,     // Q1.14
  output logic [DW-1:0]        off_max,      // largest |off-diagonal| of the last scan
  output logic [31:0]          stat_rotations,
  output logic [31:0]          stat_conflicts,
  output logic [31:0]          stat_ivru_early
);

  import svd_pkg::acc_kind_e;

  // controller <-> adsu
  logic                 cmd_valid, cmd_ready, rsp_valid, rsp_ready, adsu_conflict;
  acc_kind_e            cmd_kind;
  logic [N-1:0]         cmd_mask, cmd_sel;
  logic [N-1:0][RW-1:0] cmd_row, cmd_col;
  logic [N-1:0][DW-1:0] cmd_wdata, rsp_data;
  // adsu <-> mbm
  logic [N-1:0]         mem_rd_en, mem_wr_en;
  logic [N-1:0][RW:0]   mem_rd_addr, mem_wr_addr;
  logic [N-1:0][DW-1:0] mem_rd_data, mem_wr_data;
  // controller <-> pssm
  logic                 ps_start, ps_valid, ps_last, ps_res_valid, ps_converged;
  logic [RW-1:0]        ps_row, ps_p, ps_q;
  logic [N-1:0][DW-1:0] ps_data;
  // controller <-> ivru
  logic                 iv_start, iv_done, iv_early;
  logic signed [DW:0]   iv_x, iv_y;
  logic signed [DW-1:0] iv_cos, iv_sin;
  // controller <-> rot_alu
  logic                  ra_valid, ra_out_valid;
  logic signed [DW-1:0]  ra_c, ra_s;
  logic [RL-1:0][DW-1:0] ra_u, ra_v, ra_u_out, ra_v_out;

  svd_controller #(.N(N), .DW(DW), .RL(RL), .MAX_ROT(MAX_ROT)) u_ctrl (
    .clk, .rst_n,
    .ld_valid, .ld_ready, .ld_row,
    .start, .busy, .done, .converged, .out_valid, .out_diag,
    .vec_valid, .vec_row, .vec_data,
    .stat_rotations, .stat_conflicts, .stat_ivru_early,
    .cmd_valid, .cmd_ready, .cmd_kind, .cmd_mask, .cmd_sel, .cmd_row, .cmd_col, .cmd_wdata,
    .rsp_valid, .rsp_ready, .rsp_data, .adsu_conflict,
    .ps_start, .ps_valid, .ps_last, .ps_row, .ps_data,
    .ps_res_valid, .ps_p, .ps_q, .ps_converged,
    .iv_start, .iv_x, .iv_y, .iv_done, .iv_cos, .iv_sin, .iv_early,
    .ra_valid, .ra_c, .ra_s, .ra_u, .ra_v, .ra_out_valid, .ra_u_out, .ra_v_out
  );

  adsu #(.N(N), .L(N), .DW(DW), .MATS(2)) u_adsu (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_kind, .cmd_mask, .cmd_sel, .cmd_row, .cmd_col, .cmd_wdata,
    .rsp_valid, .rsp_ready, .rsp_data,
    .conflict(adsu_conflict),
    .mem_rd_en, .mem_rd_addr, .mem_rd_data,
    .mem_wr_en, .mem_wr_addr, .mem_wr_data
  );

  mbm #(.NB(N), .DEPTH(2*N), .DW(DW)) u_mbm (
    .clk,
    .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data),
    .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data)
  );

  pssm #(.N(N), .DW(DW)) u_pssm (
    .clk, .rst_n,
    .start(ps_start), .threshold,
    .in_valid(ps_valid), .in_last(ps_last), .in_row(ps_row), .in_data(ps_data),
    .res_valid(ps_res_valid), .res_mag(off_max), .res_p(ps_p), .res_q(ps_q),
    .converged(ps_converged)
  );

  ivru #(.DW(DW), .VEC_ITER(16)) u_ivru (
    .clk, .rst_n,
    .start(iv_start), .x_in(iv_x), .y_in(iv_y),
    .busy(), .done(iv_done),
    .cos_o(iv_cos), .sin_o(iv_sin), .theta_o(),
    .passes_o(), .early_o(iv_early)
  );

  rot_alu #(.L(RL), .DW(DW)) u_alu (
    .clk, .rst_n,
    .in_valid(ra_valid), .c(ra_c), .s(ra_s), .u(ra_u), .v(ra_v),
    .out_valid(ra_out_valid), .u_out(ra_u_out), .v_out(ra_v_out)
  );

endmodule
