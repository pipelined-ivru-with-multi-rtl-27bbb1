// tb_mbm: self-checking test of the multi-bank memory.
//
// Writes every word of every bank, all banks in the same cycle, then reads
// them back with random per-bank addresses and enables and compares with a
// reference copy. Checks the one-cycle read latency, that rd_data holds
// while rd_en is low, and that a read and a write of the same word in the
// same cycle return the old contents.
module tb_mbm;
  localparam int NB = 8, DEPTH = 16, DW = 16, AW = 4;

  logic                  clk = 1'b0;
  logic [NB-1:0]         rd_en = '0, wr_en = '0;
  logic [NB-1:0][AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [NB-1:0][DW-1:0] rd_data, wr_data = '0;

  mbm #(.NB(NB), .DEPTH(DEPTH), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [NB][DEPTH];
  logic [NB-1:0][DW-1:0] expect_q;
  logic [NB-1:0]         seen = '0;   // bank has been read at least once

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill: one word per bank per cycle, all banks at once
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        wr_en[b]   = 1'b1;
        wr_addr[b] = AW'(a);
        wr_data[b] = DW'($urandom);
        ref_mem[b][a] = wr_data[b];
      end
    end
    @(negedge clk);
    wr_en = '0;

    // random parallel reads
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        rd_en[b]   = 1'($urandom);
        rd_addr[b] = AW'($urandom);
        expect_q[b] = rd_en[b] ? ref_mem[b][rd_addr[b]] : expect_q[b];
        seen[b]     = seen[b] | rd_en[b];
      end
      // occasionally write the word being read in the same cycle
      for (int b = 0; b < NB; b++) begin
        wr_en[b]   = ($urandom % 4 == 0);
        wr_addr[b] = ($urandom % 2 == 0) ? rd_addr[b] : AW'($urandom);
        wr_data[b] = DW'($urandom);
      end
      @(posedge clk); #1;
      for (int b = 0; b < NB; b++) begin
        if (seen[b]) begin
          checks++;
          if (rd_data[b] !== expect_q[b]) begin
            failures++;
            $display("FAIL t=%0d bank %0d: got %h expected %h", t, b, rd_data[b], expect_q[b]);
          end
        end
        if (wr_en[b]) ref_mem[b][wr_addr[b]] = wr_data[b];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
