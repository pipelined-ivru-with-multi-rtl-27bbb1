// pssm: parallel scan search module. Finds the off-diagonal element of
// largest magnitude in the upper triangle of a symmetric N x N matrix and
// tells whether the matrix is diagonal to within a threshold.
//
// The matrix arrives one full row per beat (in_valid, in_row = row index,
// in_data[j] = element (in_row, j)), as the multi-bank memory delivers it.
// Every beat the N elements are distributed to N comparison channels; a
// channel keeps its element only if it is off-diagonal and in the upper
// triangle (j > row), takes its magnitude, and a binary comparator tree
// reduces the channels to the row maximum and its column in one cycle. A
// running register keeps the largest value seen over the rows of the scan.
// On the beat flagged in_last the result is registered: res_valid pulses
// for one cycle with the magnitude, the pivot indices p < q and
// `converged` = (magnitude < threshold).
//
// The stages (distribution, off-diagonal extraction, parallel magnitude,
// hierarchical comparison, index identification, threshold test) follow
// the design description. The row-per-beat input, tie breaking towards the
// lower column and then the earlier row, and saturating |-2^(DW-1)| to
// 2^(DW-1)-1 are this design's choices.
//
// Timing: res_valid is high in the cycle after the in_last beat. A new scan
// starts with the beat after res_valid, or whenever `start` is pulsed.
module pssm #(
  parameter int N  = svd_pkg::N,
  parameter int DW = svd_pkg::DATA_WIDTH,
  localparam int RW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,      // clear the running maximum
  input  logic [DW-1:0]       threshold,  // unsigned magnitude
  input  logic                in_valid,
  input  logic                in_last,
  input  logic [RW-1:0]       in_row,
  input  logic [N-1:0][DW-1:0] in_data,
  output logic                res_valid,
  output logic [DW-1:0]       res_mag,
  output logic [RW-1:0]       res_p,
  output logic [RW-1:0]       res_q,
  output logic                converged
);

  localparam int LEAVES = 1 << RW;  // tree width, power of two

  // tree nodes in heap order: node 1 is the root, leaves at LEAVES .. 2*LEAVES-1
  logic [DW-1:0] node_mag [2*LEAVES];
  logic [RW-1:0] node_col [2*LEAVES];
  logic          node_vld [2*LEAVES];  // node holds a real candidate

  logic [DW-1:0] run_mag;
  logic [RW-1:0] run_p, run_q;
  logic          run_any;   // at least one candidate seen in this scan

  function automatic logic [DW-1:0] magnitude(input logic [DW-1:0] v);
    logic [DW-1:0] m;
    m = v[DW-1] ? (~v + 1'b1) : v;
    if (m[DW-1]) m = {1'b0, {(DW-1){1'b1}}};  // -2^(DW-1) saturates
    return m;
  endfunction

  always_comb begin
    for (int k = 0; k < 2*LEAVES; k++) begin
      node_mag[k] = '0;
      node_col[k] = '0;
      node_vld[k] = 1'b0;
    end
    // distribution, off-diagonal extraction, magnitude computation
    for (int j = 0; j < LEAVES; j++) begin
      node_col[LEAVES+j] = RW'(j);
      if (j < N && j > int'(in_row)) begin
        node_mag[LEAVES+j] = magnitude(in_data[j]);
        node_vld[LEAVES+j] = 1'b1;
      end
    end
    // hierarchical comparator network
    for (int k = LEAVES-1; k >= 1; k--) begin
      if (node_vld[2*k+1] && (!node_vld[2*k] || node_mag[2*k+1] > node_mag[2*k])) begin
        node_mag[k] = node_mag[2*k+1];
        node_col[k] = node_col[2*k+1];
      end else begin
        node_mag[k] = node_mag[2*k];
        node_col[k] = node_col[2*k];
      end
      node_vld[k] = node_vld[2*k] | node_vld[2*k+1];
    end
  end

  logic          row_has;   // this row has upper-triangle elements
  logic          take;
  logic [DW-1:0] new_mag;
  logic [RW-1:0] new_p, new_q;

  assign row_has = node_vld[1];
  assign take    = row_has && (!run_any || node_mag[1] > run_mag);
  assign new_mag = take ? node_mag[1] : run_mag;
  assign new_p   = take ? in_row      : run_p;
  assign new_q   = take ? node_col[1] : run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_mag   <= '0;
      run_p     <= '0;
      run_q     <= '0;
      run_any   <= 1'b0;
      res_valid <= 1'b0;
      res_mag   <= '0;
      res_p     <= '0;
      res_q     <= '0;
      converged <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      if (start) begin
        run_any <= 1'b0;
        run_mag <= '0;
      end else if (in_valid) begin
        if (in_last) begin
          res_valid <= 1'b1;
          res_mag   <= new_mag;
          res_p     <= new_p;
          res_q     <= new_q;
          converged <= new_mag < threshold;
          run_any   <= 1'b0;
          run_mag   <= '0;
        end else begin
          run_mag <= new_mag;
          run_p   <= new_p;
          run_q   <= new_q;
          run_any <= run_any | row_has;
        end
      end
    end
  end

endmodule
