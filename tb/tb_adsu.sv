// tb_adsu: self-checking test of the address and data synchronization unit.
//
// The banks are modelled here as plain arrays with a one-cycle read
// latency. Random batches of (matrix, row, col) requests with random lane
// masks are written and read back through the unit and compared with two
// reference matrices (for a batch that writes one element twice, the
// higher lane wins). Also checked:
//   * the skewed mapping: element (r, c) of matrix m must land in bank
//     (r + c) mod N, word m*N + r;
//   * conflict resolution timing: a batch whose most used bank is asked
//     for m times is issued in m cycles, so a write is done m cycles and a
//     read answers m + 1 cycles after the accepting clock edge, and
//     `conflict` is high in m - 1 of them;
//   * the response holds while rsp_ready is low.
module tb_adsu;
  import svd_pkg::*;
  localparam int NN = 8, L = 8, DW = 16, RW = 3, AW = 4;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 cmd_valid = 1'b0, cmd_ready;
  acc_kind_e            cmd_kind = ACC_READ;
  logic [L-1:0]         cmd_mask = '0;
  logic [L-1:0]         cmd_sel = '0;
  logic [L-1:0][RW-1:0] cmd_row = '0, cmd_col = '0;
  logic [L-1:0][DW-1:0] cmd_wdata = '0;
  logic                 rsp_valid, rsp_ready = 1'b0;
  logic [L-1:0][DW-1:0] rsp_data;
  logic                 conflict;
  logic [NN-1:0]          mem_rd_en, mem_wr_en;
  logic [NN-1:0][AW-1:0]  mem_rd_addr, mem_wr_addr;
  logic [NN-1:0][DW-1:0]  mem_rd_data = '0, mem_wr_data;

  adsu #(.N(NN), .L(L), .DW(DW), .MATS(2)) dut (.*);

  always #5 clk = ~clk;

  // bank model
  logic [DW-1:0] bank [NN][2*NN];
  always_ff @(posedge clk) begin
    for (int b = 0; b < NN; b++) begin
      if (mem_wr_en[b]) bank[b][mem_wr_addr[b]] <= mem_wr_data[b];
      if (mem_rd_en[b]) mem_rd_data[b] <= bank[b][mem_rd_addr[b]];
    end
  end

  int checks = 0, failures = 0;
  int conflict_cycles = 0, conflict_batches = 0;
  always @(posedge clk) if (conflict) conflict_cycles++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] ref_m [2][NN][NN];

  // largest number of lanes of the batch that map to one bank
  function automatic int rounds_of();
    int cnt [NN];
    int m = 0;
    for (int b = 0; b < NN; b++) cnt[b] = 0;
    for (int i = 0; i < L; i++)
      if (cmd_mask[i]) cnt[(int'(cmd_row[i]) + int'(cmd_col[i])) % NN]++;
    for (int b = 0; b < NN; b++) if (cnt[b] > m) m = cnt[b];
    return m;
  endfunction

  task automatic random_batch(acc_kind_e kind, bit conflict_free);
    cmd_kind = kind;
    cmd_mask = L'($urandom);
    cmd_sel  = L'($urandom);
    if (cmd_mask == '0) cmd_mask[0] = 1'b1;
    for (int i = 0; i < L; i++) begin
      cmd_row[i]   = RW'($urandom);
      cmd_col[i]   = conflict_free ? RW'(i) : RW'($urandom);
      cmd_wdata[i] = DW'($urandom);
      if (conflict_free) cmd_row[i] = cmd_row[0];
    end
  endtask

  // issue the current batch; returns accept-to-end cycles
  task automatic run_batch(input int hold_cycles, output int lat, output int confl);
    int c0;
    int m;
    m = rounds_of();
    @(negedge clk);
    cmd_valid = 1'b1;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk); #1;
    cmd_valid = 1'b0;
    c0 = conflict_cycles;
    lat = 0;
    if (cmd_kind == ACC_WRITE) begin
      for (int i = 0; i < L; i++)
        if (cmd_mask[i]) ref_m[cmd_sel[i]][cmd_row[i]][cmd_col[i]] = cmd_wdata[i];
      while (!cmd_ready) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != m) begin
        failures++;
        $display("FAIL write: took %0d cycles, expected %0d", lat, m);
      end
    end else begin
      while (!rsp_valid) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != m + 1) begin
        failures++;
        $display("FAIL read: answered after %0d cycles, expected %0d", lat, m + 1);
      end
      // hold the response for a while
      repeat (hold_cycles) begin
        @(posedge clk); #1;
        checks++;
        if (!rsp_valid) begin failures++; $display("FAIL: response dropped"); end
      end
      for (int i = 0; i < L; i++)
        if (cmd_mask[i]) begin
          checks++;
          if (rsp_data[i] !== ref_m[cmd_sel[i]][cmd_row[i]][cmd_col[i]]) begin
            failures++;
            $display("FAIL read lane %0d %0d(%0d,%0d): got %h expected %h", i, cmd_sel[i],
                     cmd_row[i], cmd_col[i], rsp_data[i], ref_m[cmd_sel[i]][cmd_row[i]][cmd_col[i]]);
          end
        end
      rsp_ready = 1'b1;
      @(posedge clk); #1;
      rsp_ready = 1'b0;
    end
    confl = conflict_cycles - c0;
    checks++;
    if (confl != m - 1) begin
      failures++;
      $display("FAIL: %0d conflict cycles, expected %0d", confl, m - 1);
    end
    if (m > 1) conflict_batches++;
  endtask

  initial begin
    int lat, confl;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // fill both matrices, one row per conflict-free batch
    for (int r = 0; r < 2*NN; r++) begin
      cmd_kind = ACC_WRITE;
      cmd_mask = '1;
      cmd_sel  = (r >= NN) ? '1 : '0;
      for (int i = 0; i < L; i++) begin
        cmd_row[i] = RW'(r % NN); cmd_col[i] = RW'(i); cmd_wdata[i] = DW'($urandom);
      end
      run_batch(0, lat, confl);
    end
    // mapping check against the bank model
    for (int m = 0; m < 2; m++)
      for (int r = 0; r < NN; r++)
        for (int c = 0; c < NN; c++) begin
          checks++;
          if (bank[(r + c) % NN][m*NN + r] !== ref_m[m][r][c]) begin
            failures++;
            $display("FAIL mapping: element %0d(%0d,%0d) not in bank %0d word %0d", m, r, c,
                     (r + c) % NN, m*NN + r);
          end
        end

    for (int t = 0; t < 300; t++) begin
      random_batch((t % 3 == 0) ? ACC_WRITE : ACC_READ, t % 5 == 0);
      run_batch(t % 4, lat, confl);
    end

    checks++;
    if (conflict_batches == 0) begin failures++; $display("FAIL: no conflicting batch"); end
    $display("conflicting batches: %0d", conflict_batches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
