// tb_aes_enc_regular: feeds blocks one 32-bit column per cycle into the
// regular encryption unit, collects the four result columns and compares
// them with the reference. Checks that the last result column appears 17
// cycles after the first input column, and runs blocks back to back (next
// start in the last output cycle) as well as with gaps.
module tb_aes_enc_regular;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, dout_valid, busy;
  logic [31:0] din = '0, dout;
  logic [127:0] key = '0;
  int checks = 0, failures = 0;
  int back_to_back = 0;

  aes_enc_regular dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Blocks to run, and the clock edge that sampled each start
  logic [127:0] pts [24];
  logic [127:0] keys[24];
  int gap [24];
  int start_edge [24];
  int edge_no = 0;

  always @(posedge clk) edge_no++;

  // Driver: a gap of 0 puts the next start on the last output cycle
  initial begin
    pts[0] = KAT_PT0; keys[0] = KAT_KEY0; gap[0] = 0;
    pts[1] = KAT_PT1; keys[1] = KAT_KEY1; gap[1] = 2;
    for (int n = 2; n < 24; n++) begin pts[n] = rand128(); keys[n] = rand128(); gap[n] = (n % 3 == 0) ? 3 : 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 24; n++) begin
      while (busy) @(negedge clk);
      repeat (gap[n]) @(negedge clk);
      if (n > 0 && dout_valid) back_to_back++;
      key = keys[n];
      start_edge[n] = edge_no + 1;
      for (int c = 0; c < 4; c++) begin
        start = (c == 0); din = pts[n][127-32*c -: 32];
        @(negedge clk);
      end
      start = 0; din = $urandom;
    end
  end

  // Monitor: gathers result columns and checks them and the block latency
  initial begin
    int col = 0, blk = 0;
    logic [127:0] got;
    forever begin
      @(posedge clk);
      #1;
      if (dout_valid) begin
        got[127-32*col -: 32] = dout;
        col++;
        if (col == 4) begin
          logic [127:0] exp;
          exp = (blk == 0) ? KAT_CT0 : (blk == 1) ? KAT_CT1 : encrypt(pts[blk], keys[blk]);
          checks++;
          if (got !== exp) begin failures++; $display("FAIL block %0d got %h exp %h", blk, got, exp); end
          checks++;
          if (edge_no - start_edge[blk] + 1 != 17) begin
            failures++; $display("FAIL block %0d took %0d cycles", blk, edge_no - start_edge[blk] + 1);
          end
          col = 0; blk++;
          if (blk == 24) begin
            checks++;
            if (back_to_back == 0) begin failures++; $display("FAIL no back-to-back block"); end
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
    end
  end
endmodule
