// ivru: iterative vector rotation unit. Computes the Jacobi rotation that
// zeroes the pivot a_pq of a symmetric matrix.
//
// Inputs are the vector x = a_pp - a_qq and y = 2*a_pq. The rotation angle
// is theta = atan(y / x) / 2 (|theta| <= pi/4), so that with c = cos(theta),
// s = sin(theta) and R = [c -s; s c] in the (p, q) plane, R^T A R has a zero
// at (p, q). The unit works in the stages of its flow:
//   Input data     x, y are captured with GUARD extra fraction bits.
//   Change in sequences
//                  the vector is folded into the right half plane (x < 0:
//                  negate both) and, on every pass of the loop, the next
//                  micro-rotation is chosen: shift i and direction from the
//                  sign of y.
//   Iterative sequences
//                  one shift-and-add micro-rotation by atan(2^-i) moves the
//                  vector towards the x axis; the angle accumulator z keeps
//                  the sum of the applied angles.
//   Convergence achieved?
//                  if |y| <= CONV_TOL or VEC_ITER micro-rotations are done,
//                  the loop ends, otherwise it goes round again.
//   Multi-bit rotation unit
//                  theta = z/2 is turned into (c, s) by rotating the
//                  gain-compensated vector (K, 0) by theta, resolving MB
//                  angle bits (MB unrolled micro-rotations) per clock.
// The stage names and the loop with its convergence test come from the
// design's IVRU flow; shift-and-add (CORDIC) micro-rotations as the
// iteration, the tolerance, the iteration counts and the number formats are
// this design's choices.
//
// Timing: `start` is taken when idle (busy low). One cycle for input
// acquisition, one cycle per loop pass (at most VEC_ITER), then
// ceil(ROT_ITER / MB) cycles in the rotation stage; `done` pulses with
// c, s, theta and the pass count valid, and they hold until the next start.
// Number formats: x, y signed integers (DW+1 bits); c, s signed Q1.14 in DW
// bits; theta signed radians * 2^16.
module ivru
  import svd_pkg::*;
#(
  parameter int DW       = svd_pkg::DATA_WIDTH,
  parameter int VEC_ITER = 16,  // maximum passes of the vectoring loop
  parameter int ROT_ITER = 16,  // micro-rotations in the rotation stage
  parameter int MB       = 2,   // angle bits resolved per cycle in rotation
  parameter int GUARD    = 4,   // extra fraction bits in the vectoring loop
  parameter int CONV_TOL = 0,   // |y| tolerance (in input LSBs << GUARD)
  localparam int XW = DW + 1,               // input width
  localparam int IW = XW + 2 + GUARD,       // vectoring datapath width
  localparam int CW = COEF_FRAC + 2 + 4,    // rotation datapath width
  localparam int NW = $clog2(VEC_ITER + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [XW-1:0]    x_in,
  input  logic signed [XW-1:0]    y_in,
  output logic                    busy,
  output logic                    done,
  output logic signed [DW-1:0]    cos_o,
  output logic signed [DW-1:0]    sin_o,
  output logic signed [ANGLE_W-1:0] theta_o,
  output logic [NW-1:0]           passes_o,   // loop passes used
  output logic                    early_o     // converged before VEC_ITER
);

  typedef enum logic [1:0] { S_IDLE, S_VEC, S_ROT } state_e;
  state_e state;

  logic signed [IW-1:0]      vx, vy;
  logic signed [ANGLE_W-1:0] vz;
  logic [NW-1:0]             pass;
  logic signed [CW-1:0]      rx, ry;
  logic signed [ANGLE_W-1:0] rz;
  int unsigned               ri;   // next rotation-stage micro-rotation

  // ---- change in sequences + iterative sequences (one loop pass) ----
  logic                      dir_pos;
  logic signed [IW-1:0]      nx, ny;
  logic signed [ANGLE_W-1:0] nz;
  logic                      conv;

  always_comb begin
    dir_pos = (vy >= 0);
    if (dir_pos) begin
      nx = vx + (vy >>> pass);
      ny = vy - (vx >>> pass);
      nz = vz + atan_lookup(int'(pass));
    end else begin
      nx = vx - (vy >>> pass);
      ny = vy + (vx >>> pass);
      nz = vz - atan_lookup(int'(pass));
    end
    // convergence evaluation on the updated vector
    conv = ((ny < 0) ? -ny : ny) <= IW'(CONV_TOL) || int'(pass) + 1 >= VEC_ITER;
  end

  // ---- multi-bit rotation unit: MB micro-rotations per cycle ----
  logic signed [CW-1:0]      mx [MB+1];
  logic signed [CW-1:0]      my [MB+1];
  logic signed [ANGLE_W-1:0] mz [MB+1];

  always_comb begin
    mx[0] = rx;
    my[0] = ry;
    mz[0] = rz;
    for (int k = 0; k < MB; k++) begin
      if (ri + k < ROT_ITER) begin
        if (mz[k] >= 0) begin
          mx[k+1] = mx[k] - (my[k] >>> (ri + k));
          my[k+1] = my[k] + (mx[k] >>> (ri + k));
          mz[k+1] = mz[k] - atan_lookup(int'(ri) + k);
        end else begin
          mx[k+1] = mx[k] + (my[k] >>> (ri + k));
          my[k+1] = my[k] - (mx[k] >>> (ri + k));
          mz[k+1] = mz[k] + atan_lookup(int'(ri) + k);
        end
      end else begin
        mx[k+1] = mx[k];
        my[k+1] = my[k];
        mz[k+1] = mz[k];
      end
    end
  end

  // Q1.14 output with rounding from the 4 extra fraction bits
  function automatic logic signed [DW-1:0] to_coef(input logic signed [CW-1:0] v);
    logic signed [CW-1:0] r;
    r = (v + CW'(8)) >>> 4;
    return DW'(r);
  endfunction

  // angle handed to the rotation stage, kept for the theta output
  logic signed [ANGLE_W-1:0] theta_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) theta_hold <= '0;
    else if (state == S_IDLE && start) theta_hold <= '0;
    else if (state == S_VEC && conv)   theta_hold <= nz >>> 1;
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      vx       <= '0;
      vy       <= '0;
      vz       <= '0;
      pass     <= '0;
      rx       <= '0;
      ry       <= '0;
      rz       <= '0;
      ri       <= 0;
      done     <= 1'b0;
      cos_o    <= '0;
      sin_o    <= '0;
      theta_o  <= '0;
      passes_o <= '0;
      early_o  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          // input data acquisition and half-plane fold
          if (x_in < 0) begin
            vx <= -(IW'(x_in) <<< GUARD);
            vy <= -(IW'(y_in) <<< GUARD);
          end else begin
            vx <= IW'(x_in) <<< GUARD;
            vy <= IW'(y_in) <<< GUARD;
          end
          vz   <= '0;
          pass <= '0;
          if (y_in == 0) begin
            // already on the axis: nothing to iterate
            rx      <= CW'(CORDIC_K14) <<< 4;
            ry      <= '0;
            rz      <= '0;
            ri      <= 0;
            early_o <= 1'b1;
            state   <= S_ROT;
          end else begin
            state <= S_VEC;
          end
        end
        S_VEC: begin
          vx   <= nx;
          vy   <= ny;
          vz   <= nz;
          pass <= pass + 1'b1;
          if (conv) begin
            early_o <= (int'(pass) + 1 < VEC_ITER);
            rx      <= CW'(CORDIC_K14) <<< 4;
            ry      <= '0;
            rz      <= nz >>> 1;    // theta = (2 theta) / 2
            ri      <= 0;
            state   <= S_ROT;
          end
        end
        S_ROT: begin
          rx <= mx[MB];
          ry <= my[MB];
          rz <= mz[MB];
          ri <= ri + MB;
          if (ri + MB >= ROT_ITER) begin
            cos_o    <= to_coef(mx[MB]);
            sin_o    <= to_coef(my[MB]);
            theta_o  <= theta_hold;
            passes_o <= pass;
            done     <= 1'b1;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
