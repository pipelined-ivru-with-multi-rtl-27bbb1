// adsu: address and data synchronization unit between the controller and
// the multi-bank memory.
//
// The controller hands over a batch of up to L element requests at once: a
// lane mask, a matrix select and a (row, col) coordinate per lane and, for
// writes, the data. MATS matrices of N x N share the banks (the unit uses
// two: the matrix being diagonalised and the accumulated rotations). The
// unit
//   1. generates the bank and in-bank address of every lane. Each matrix is
//      stored skewed: element (r, c) of matrix m is in bank (r + c) mod N at
//      word m*N + r, so a full row, a full column, or two rows p != q at the
//      same column all fall in different banks;
//   2. selects banks and detects bank conflicts: a lane is granted in a
//      cycle only if no lower-numbered pending lane targets the same bank;
//   3. issues all granted lanes to their banks in parallel and keeps the
//      others pending for the next cycle (conflict resolution by
//      serialising, flagged on `conflict`);
//   4. for reads, collects the words as they return from the banks in a
//      lane-ordered alignment buffer and presents them together, once every
//      lane has arrived, with a valid/ready handshake.
// The list of steps (address generation, bank selection, alignment,
// conflict detection and resolution, handshaking with the consumers) follows
// the design description; the skewed mapping, lane-priority arbitration and
// one-batch-at-a-time operation are this design's choices.
//
// Timing: a batch is accepted on a clock edge with cmd_valid && cmd_ready.
// If its most used bank is asked for m times, it is issued over the next m
// cycles (m = 1 without conflicts). A write batch is complete, and
// cmd_ready high again, m edges after acceptance; a read batch has rsp_data
// and rsp_valid m + 1 edges after acceptance. cmd_ready is low while a
// batch is in flight or a response waits for rsp_ready.
module adsu
  import svd_pkg::acc_kind_e, svd_pkg::ACC_READ, svd_pkg::ACC_WRITE;
#(
  parameter int N  = svd_pkg::N,
  parameter int L  = svd_pkg::N,            // request lanes per batch
  parameter int DW = svd_pkg::DATA_WIDTH,
  parameter int MATS = 2,                   // matrices stored in the banks
  localparam int RW = (N > 1) ? $clog2(N) : 1,
  localparam int SW = (MATS > 1) ? $clog2(MATS) : 1,
  localparam int AW = (N*MATS > 1) ? $clog2(N*MATS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command from the controller
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  acc_kind_e            cmd_kind,
  input  logic [L-1:0]         cmd_mask,
  input  logic [L-1:0][SW-1:0] cmd_sel,    // matrix select
  input  logic [L-1:0][RW-1:0] cmd_row,
  input  logic [L-1:0][RW-1:0] cmd_col,
  input  logic [L-1:0][DW-1:0] cmd_wdata,
  // aligned read response
  output logic                 rsp_valid,
  input  logic                 rsp_ready,
  output logic [L-1:0][DW-1:0] rsp_data,
  // status
  output logic                 conflict,   // lanes deferred this cycle
  // multi-bank memory side
  output logic [N-1:0]         mem_rd_en,
  output logic [N-1:0][AW-1:0] mem_rd_addr,
  input  logic [N-1:0][DW-1:0] mem_rd_data,
  output logic [N-1:0]         mem_wr_en,
  output logic [N-1:0][AW-1:0] mem_wr_addr,
  output logic [N-1:0][DW-1:0] mem_wr_data
);

  acc_kind_e            kind_q;
  logic [L-1:0]         pend_q;      // lanes not yet issued
  logic [L-1:0]         inflight_q;  // read lanes issued last cycle
  logic [L-1:0][RW-1:0] bank_q;
  logic [L-1:0][AW-1:0] addr_q;
  logic [L-1:0][DW-1:0] wdata_q;
  logic [L-1:0]         grant;

  // address generation: skewed bank mapping
  function automatic logic [RW-1:0] bank_of(input logic [RW-1:0] r, input logic [RW-1:0] c);
    return RW'((int'(r) + int'(c)) % N);
  endfunction

  // bank conflict detection: lowest pending lane wins each bank
  always_comb begin
    grant = '0;
    for (int i = 0; i < L; i++) begin
      grant[i] = pend_q[i];
      for (int j = 0; j < i; j++)
        if (pend_q[j] && bank_q[j] == bank_q[i]) grant[i] = 1'b0;
    end
  end

  assign conflict  = |(pend_q & ~grant);
  assign cmd_ready = (pend_q == '0) && (inflight_q == '0) && !rsp_valid;

  // bank selection: route granted lanes to their banks
  always_comb begin
    mem_rd_en   = '0;
    mem_rd_addr = '0;
    mem_wr_en   = '0;
    mem_wr_addr = '0;
    mem_wr_data = '0;
    for (int b = 0; b < N; b++)
      for (int i = 0; i < L; i++)
        if (grant[i] && int'(bank_q[i]) == b) begin
          if (kind_q == ACC_WRITE) begin
            mem_wr_en[b]   = 1'b1;
            mem_wr_addr[b] = addr_q[i];
            mem_wr_data[b] = wdata_q[i];
          end else begin
            mem_rd_en[b]   = 1'b1;
            mem_rd_addr[b] = addr_q[i];
          end
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kind_q     <= ACC_READ;
      pend_q     <= '0;
      inflight_q <= '0;
      bank_q     <= '0;
      addr_q     <= '0;
      wdata_q    <= '0;
      rsp_valid  <= 1'b0;
      rsp_data   <= '0;
    end else begin
      if (cmd_valid && cmd_ready) begin
        kind_q  <= cmd_kind;
        pend_q  <= cmd_mask;
        wdata_q <= cmd_wdata;
        for (int i = 0; i < L; i++) begin
          bank_q[i] <= bank_of(cmd_row[i], cmd_col[i]);
          addr_q[i] <= AW'(int'(cmd_sel[i]) * N + int'(cmd_row[i]));
        end
      end else begin
        pend_q <= pend_q & ~grant;
      end

      inflight_q <= (kind_q == ACC_READ) ? grant : '0;

      // data retrieval and alignment
      for (int i = 0; i < L; i++)
        if (inflight_q[i]) rsp_data[i] <= mem_rd_data[bank_q[i]];

      if (inflight_q != '0 && pend_q == '0) rsp_valid <= 1'b1;
      else if (rsp_ready)                   rsp_valid <= 1'b0;
    end
  end

  // handshake rules
  property p_nonempty_batch;
    @(posedge clk) disable iff (!rst_n) cmd_valid && cmd_ready |-> cmd_mask != '0;
  endproperty
  a_nonempty_batch: assert property (p_nonempty_batch);

  property p_rsp_hold;
    @(posedge clk) disable iff (!rst_n) rsp_valid && !rsp_ready |=> rsp_valid;
  endproperty
  a_rsp_hold: assert property (p_rsp_hold);

endmodule
