// svd_controller: central sequencer of the Jacobi SVD unit.
//
// It runs the classical (largest-pivot) Jacobi method on the symmetric
// correlation matrix held in the multi-bank memory. For a symmetric matrix
// the singular values are the magnitudes of the eigenvalues, which the
// method leaves on the diagonal.
//   Load     matrix rows arrive on ld_* (rows 0 .. N-1 in order, one row per
//            accepted beat) and are written through the ADSU, one row per
//            batch.
//   Scan     after `start`, rows 0 .. N-1 are read, one whole row per batch,
//            and passed to the parallel scan search (pssm).
//   Decide   the scan result gives the pivot (p, q). If its magnitude is
//            below `threshold`, or MAX_ROT rotations have been done, the
//            diagonal is read out and the run ends.
//   Pivot    a_pp, a_qq, a_pq are read in one batch; x = a_pp - a_qq and
//            y = 2*a_pq go to the IVRU, which returns c, s.
//   Rows     rows p and q are rotated, RL columns per batch: read
//            (p,k),(q,k) .. , rotate in rot_alu, write back.
//   Columns  the same for columns p and q, giving R^T A R.
//   Vectors  the same for columns p and q of the rotation accumulator V
//            (V := V R), a second matrix in the banks that `start` sets to
//            the identity (Q1.14). Its columns end as the eigenvectors,
//            i.e. the singular vectors of the symmetric input.
//   Output   the N diagonal elements are read in one batch (this batch has
//            bank conflicts and shows the ADSU serialising them) and
//            presented on out_diag with out_valid and the converged flag;
//            then the rows of V follow, one per vec_valid beat, and the
//            last beat comes with done.
// The controller's role (initialising the units, sequencing memory access,
// search, rotation and update, and monitoring convergence) follows the
// design description; the order of the steps above, the batch shapes and
// the rotation limit are this design's choices.
//
// Statistics outputs count rotations, cycles in which the ADSU deferred
// lanes because of a bank conflict, and IVRU runs that converged before the
// iteration limit. They are cleared by `start`.
module svd_controller
  import svd_pkg::acc_kind_e, svd_pkg::ACC_READ, svd_pkg::ACC_WRITE;
#(
  parameter int N       = svd_pkg::N,
  parameter int DW      = svd_pkg::DATA_WIDTH,
  parameter int RL      = 2,     // element pairs rotated per batch
  parameter int MAX_ROT = 1024,  // rotation limit per run
  localparam int RW = (N > 1) ? $clog2(N) : 1,
  localparam int XW = DW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // matrix load
  input  logic                 ld_valid,
  output logic                 ld_ready,
  input  logic [N-1:0][DW-1:0] ld_row,
  // run control
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 converged,
  output logic                 out_valid,
  output logic [N-1:0][DW-1:0] out_diag,
  output logic                 vec_valid,
  output logic [RW-1:0]        vec_row,
  output logic [N-1:0][DW-1:0] vec_data,
  // statistics
  output logic [31:0]          stat_rotations,
  output logic [31:0]          stat_conflicts,
  output logic [31:0]          stat_ivru_early,
  // ADSU command / response
  output logic                 cmd_valid,
  input  logic                 cmd_ready,
  output acc_kind_e            cmd_kind,
  output logic [N-1:0]         cmd_mask,
  output logic [N-1:0]         cmd_sel,
  output logic [N-1:0][RW-1:0] cmd_row,
  output logic [N-1:0][RW-1:0] cmd_col,
  output logic [N-1:0][DW-1:0] cmd_wdata,
  input  logic                 rsp_valid,
  output logic                 rsp_ready,
  input  logic [N-1:0][DW-1:0] rsp_data,
  input  logic                 adsu_conflict,
  // PSSM
  output logic                 ps_start,
  output logic                 ps_valid,
  output logic                 ps_last,
  output logic [RW-1:0]        ps_row,
  output logic [N-1:0][DW-1:0] ps_data,
  input  logic                 ps_res_valid,
  input  logic [RW-1:0]        ps_p,
  input  logic [RW-1:0]        ps_q,
  input  logic                 ps_converged,
  // IVRU
  output logic                 iv_start,
  output logic signed [XW-1:0] iv_x,
  output logic signed [XW-1:0] iv_y,
  input  logic                 iv_done,
  input  logic signed [DW-1:0] iv_cos,
  input  logic signed [DW-1:0] iv_sin,
  input  logic                 iv_early,
  // rotation datapath (adders and multipliers)
  output logic                 ra_valid,
  output logic signed [DW-1:0] ra_c,
  output logic signed [DW-1:0] ra_s,
  output logic [RL-1:0][DW-1:0] ra_u,
  output logic [RL-1:0][DW-1:0] ra_v,
  input  logic                 ra_out_valid,
  input  logic [RL-1:0][DW-1:0] ra_u_out,
  input  logic [RL-1:0][DW-1:0] ra_v_out
);

  typedef enum logic [3:0] {
    S_IDLE, S_VINIT,
    S_SCAN_RD, S_SCAN_WAIT, S_DECIDE,
    S_PIV_RD, S_PIV_WAIT, S_IVRU,
    S_UPD_RD, S_UPD_WAIT, S_UPD_ALU, S_UPD_WR,
    S_DIAG_RD, S_DIAG_WAIT, S_VEC_RD, S_VEC_WAIT
  } state_e;

  localparam logic [DW-1:0] ONE = DW'(1) << svd_pkg::COEF_FRAC;  // 1.0 in Q1.14

  state_e        state;
  logic [RW-1:0] ld_cnt;      // next row to load
  logic [RW-1:0] scan_row;
  logic [RW-1:0] p_q, q_q;    // pivot
  logic signed [DW-1:0] c_q, s_q;
  logic [1:0]    pass_q;      // 0: rows of A, 1: columns of A, 2: columns of V
  logic [RW-1:0] vrow;        // row of V being initialised or read out
  int unsigned   k_q;         // first index of the current update batch
  logic [RL-1:0][DW-1:0] u_q, v_q;
  logic [31:0]   rot_cnt;

  assign busy     = (state != S_IDLE);
  assign ld_ready = (state == S_IDLE) && cmd_ready && !start;
  assign ps_start = start && (state == S_IDLE);

  // ---- ADSU command formation ----
  always_comb begin
    cmd_valid = 1'b0;
    cmd_kind  = ACC_READ;
    cmd_mask  = '0;
    cmd_sel   = '0;
    cmd_row   = '0;
    cmd_col   = '0;
    cmd_wdata = '0;
    unique case (state)
      S_IDLE: if (ld_valid && !start) begin
        cmd_valid = 1'b1;
        cmd_kind  = ACC_WRITE;
        cmd_mask  = '1;
        for (int i = 0; i < N; i++) begin
          cmd_row[i]   = ld_cnt;
          cmd_col[i]   = RW'(i);
          cmd_wdata[i] = ld_row[i];
        end
      end
      S_VINIT: begin
        cmd_valid = 1'b1;
        cmd_kind  = ACC_WRITE;
        cmd_mask  = '1;
        cmd_sel   = '1;
        for (int i = 0; i < N; i++) begin
          cmd_row[i]   = vrow;
          cmd_col[i]   = RW'(i);
          cmd_wdata[i] = (RW'(i) == vrow) ? ONE : '0;
        end
      end
      S_VEC_RD: begin
        cmd_valid = 1'b1;
        cmd_mask  = '1;
        cmd_sel   = '1;
        for (int i = 0; i < N; i++) begin
          cmd_row[i] = vrow;
          cmd_col[i] = RW'(i);
        end
      end
      S_SCAN_RD: begin
        cmd_valid = 1'b1;
        cmd_mask  = '1;
        for (int i = 0; i < N; i++) begin
          cmd_row[i] = scan_row;
          cmd_col[i] = RW'(i);
        end
      end
      S_PIV_RD: begin
        cmd_valid  = 1'b1;
        cmd_mask   = N'(3'b111);
        cmd_row[0] = p_q;  cmd_col[0] = p_q;
        cmd_row[1] = q_q;  cmd_col[1] = q_q;
        cmd_row[2] = p_q;  cmd_col[2] = q_q;
      end
      S_UPD_RD, S_UPD_WR: begin
        cmd_valid = 1'b1;
        cmd_kind  = (state == S_UPD_WR) ? ACC_WRITE : ACC_READ;
        for (int r = 0; r < RL; r++) begin
          if (k_q + r < N) begin
            cmd_mask[2*r]   = 1'b1;
            cmd_mask[2*r+1] = 1'b1;
          end
          cmd_sel[2*r]   = (pass_q == 2'd2);
          cmd_sel[2*r+1] = (pass_q == 2'd2);
          if (pass_q == 2'd0) begin
            cmd_row[2*r]   = p_q;  cmd_col[2*r]   = RW'(k_q + r);
            cmd_row[2*r+1] = q_q;  cmd_col[2*r+1] = RW'(k_q + r);
          end else begin
            cmd_row[2*r]   = RW'(k_q + r);  cmd_col[2*r]   = p_q;
            cmd_row[2*r+1] = RW'(k_q + r);  cmd_col[2*r+1] = q_q;
          end
          cmd_wdata[2*r]   = u_q[r];
          cmd_wdata[2*r+1] = v_q[r];
        end
      end
      S_DIAG_RD: begin
        cmd_valid = 1'b1;
        cmd_mask  = '1;
        for (int i = 0; i < N; i++) begin
          cmd_row[i] = RW'(i);
          cmd_col[i] = RW'(i);
        end
      end
      default: ;
    endcase
  end

  assign rsp_ready = (state == S_SCAN_WAIT) || (state == S_PIV_WAIT) ||
                     (state == S_UPD_WAIT)  || (state == S_DIAG_WAIT) ||
                     (state == S_VEC_WAIT);

  // ---- scan results to the PSSM ----
  assign ps_valid = (state == S_SCAN_WAIT) && rsp_valid;
  assign ps_last  = (scan_row == RW'(N-1));
  assign ps_row   = scan_row;
  assign ps_data  = rsp_data;

  // ---- pivot values to the IVRU ----
  assign iv_start = (state == S_PIV_WAIT) && rsp_valid;
  assign iv_x     = XW'($signed(rsp_data[0])) - XW'($signed(rsp_data[1]));
  assign iv_y     = XW'($signed(rsp_data[2])) <<< 1;

  // ---- rotation datapath operands ----
  assign ra_valid = (state == S_UPD_WAIT) && rsp_valid;
  assign ra_c     = c_q;
  assign ra_s     = s_q;
  always_comb begin
    for (int r = 0; r < RL; r++) begin
      ra_u[r] = rsp_data[2*r];
      ra_v[r] = rsp_data[2*r+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      ld_cnt          <= '0;
      scan_row        <= '0;
      p_q             <= '0;
      q_q             <= '0;
      c_q             <= '0;
      s_q             <= '0;
      pass_q          <= '0;
      vrow            <= '0;
      k_q             <= 0;
      u_q             <= '0;
      v_q             <= '0;
      rot_cnt         <= '0;
      done            <= 1'b0;
      converged       <= 1'b0;
      out_valid       <= 1'b0;
      out_diag        <= '0;
      vec_valid       <= 1'b0;
      vec_row         <= '0;
      vec_data        <= '0;
      stat_rotations  <= '0;
      stat_conflicts  <= '0;
      stat_ivru_early <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      vec_valid <= 1'b0;
      if (adsu_conflict) stat_conflicts <= stat_conflicts + 1;

      unique case (state)
        S_IDLE: begin
          if (start) begin
            scan_row        <= '0;
            rot_cnt         <= '0;
            converged       <= 1'b0;
            stat_rotations  <= '0;
            stat_conflicts  <= '0;
            stat_ivru_early <= '0;
            ld_cnt          <= '0;
            vrow            <= '0;
            state           <= S_VINIT;
          end else if (ld_valid && cmd_ready) begin
            ld_cnt <= (ld_cnt == RW'(N-1)) ? '0 : ld_cnt + 1'b1;
          end
        end
        S_VINIT: if (cmd_ready) begin
          vrow <= vrow + 1'b1;
          if (vrow == RW'(N-1)) state <= S_SCAN_RD;
        end
        S_SCAN_RD: if (cmd_ready) state <= S_SCAN_WAIT;
        S_SCAN_WAIT: if (rsp_valid) begin
          if (scan_row == RW'(N-1)) begin
            scan_row <= '0;
            state    <= S_DECIDE;
          end else begin
            scan_row <= scan_row + 1'b1;
            state    <= S_SCAN_RD;
          end
        end
        S_DECIDE: if (ps_res_valid) begin
          if (ps_converged || rot_cnt >= MAX_ROT) begin
            converged <= ps_converged;
            state     <= S_DIAG_RD;
          end else begin
            p_q   <= ps_p;
            q_q   <= ps_q;
            state <= S_PIV_RD;
          end
        end
        S_PIV_RD: if (cmd_ready) state <= S_PIV_WAIT;
        S_PIV_WAIT: if (rsp_valid) state <= S_IVRU;
        S_IVRU: if (iv_done) begin
          c_q      <= iv_cos;
          s_q      <= iv_sin;
          if (iv_early) stat_ivru_early <= stat_ivru_early + 1;
          pass_q   <= 2'd0;
          k_q      <= 0;
          state    <= S_UPD_RD;
        end
        S_UPD_RD: if (cmd_ready) state <= S_UPD_WAIT;
        S_UPD_WAIT: if (rsp_valid) state <= S_UPD_ALU;
        S_UPD_ALU: if (ra_out_valid) begin
          u_q   <= ra_u_out;
          v_q   <= ra_v_out;
          state <= S_UPD_WR;
        end
        S_UPD_WR: if (cmd_ready) begin
          if (k_q + RL < N) begin
            k_q   <= k_q + RL;
            state <= S_UPD_RD;
          end else if (pass_q != 2'd2) begin
            k_q    <= 0;
            pass_q <= pass_q + 2'd1;
            state  <= S_UPD_RD;
          end else begin
            rot_cnt        <= rot_cnt + 1;
            stat_rotations <= stat_rotations + 1;
            state          <= S_SCAN_RD;
          end
        end
        S_DIAG_RD: if (cmd_ready) state <= S_DIAG_WAIT;
        S_DIAG_WAIT: if (rsp_valid) begin
          out_diag  <= rsp_data;
          out_valid <= 1'b1;
          vrow      <= '0;
          state     <= S_VEC_RD;
        end
        S_VEC_RD: if (cmd_ready) state <= S_VEC_WAIT;
        S_VEC_WAIT: if (rsp_valid) begin
          vec_valid <= 1'b1;
          vec_row   <= vrow;
          vec_data  <= rsp_data;
          vrow      <= vrow + 1'b1;
          if (vrow == RW'(N-1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_VEC_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
