// mbm: multi-bank memory holding the correlation matrix.
//
// The storage is split into NB independent banks of DEPTH words. Every bank
// has its own read port and its own write port, so in one clock cycle up to
// NB reads and NB writes can be served, one of each per bank. This is what
// lets the scan unit receive a whole matrix row per cycle and lets the
// rotation datapath fetch and write back several elements at once.
//
// Which matrix element lives in which bank is decided by the address and
// data synchronization unit (adsu); the memory itself only sees per-bank
// addresses. Splitting the matrix over parallel banks follows the design
// description; the port structure (one synchronous read and one write port
// per bank) and the read-before-write behaviour are this design's choices.
//
// Timing: a read issued in cycle t (rd_en[b] high) returns rd_data[b] after
// the clock edge, i.e. valid in cycle t+1. A write in cycle t is visible to
// reads issued from cycle t+1 on. A read and a write to the same word in the
// same cycle return the old contents. rd_data holds its value while rd_en is
// low. Contents are not reset; the matrix is loaded before use.
module mbm #(
  parameter int NB    = svd_pkg::N,
  parameter int DEPTH = 2*svd_pkg::N,   // two N x N matrices
  parameter int DW    = svd_pkg::DATA_WIDTH,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic [NB-1:0]        rd_en,
  input  logic [NB-1:0][AW-1:0] rd_addr,
  output logic [NB-1:0][DW-1:0] rd_data,
  input  logic [NB-1:0]        wr_en,
  input  logic [NB-1:0][AW-1:0] wr_addr,
  input  logic [NB-1:0][DW-1:0] wr_data
);

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic [DW-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (wr_en[b]) mem[wr_addr[b]] <= wr_data[b];
      if (rd_en[b]) rd_data[b] <= mem[rd_addr[b]];
    end
  end

endmodule
