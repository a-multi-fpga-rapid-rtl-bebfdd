// tb_aes_throughput: streams blocks back to back through each of the four
// cores and measures the sustained block period, which sets the throughput:
// 12 cycles for the iterative cores and 17 for the regular ones. The next
// start is issued in the cycle in which the previous result appears
// (iterative) or in the last output cycle (regular). Every result is checked
// against the reference, and the throughput at the published clock rates
// (74.6 / 65.9 MHz for the iterative encryption / decryption cores,
// 67.9 / 61.9 MHz for the regular ones) is printed for comparison.
module tb_aes_throughput;
  import aes_ref_pkg::*;
  localparam int NBLK = 32;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int edge_no = 0;
  always #5 clk = ~clk;
  always @(posedge clk) edge_no++;

  logic [127:0] key_e, key_d;
  logic [127:0] blk [NBLK];

  // iterative encryption
  logic s1 = 0, d1, b1; logic [127:0] o1, i1 = '0;
  aes_enc_iter u1 (.clk, .rst_n, .start(s1), .din(i1), .key(key_e), .dout(o1), .done(d1), .busy(b1));
  // iterative decryption
  logic s2 = 0, k2 = 0, r2, d2, b2; logic [127:0] o2, i2 = '0;
  aes_dec_iter u2 (.clk, .rst_n, .key_setup(k2), .key(key_d), .key_ready(r2), .start(s2), .din(i2), .dout(o2), .done(d2), .busy(b2));
  // regular encryption
  logic s3 = 0, v3, b3; logic [31:0] i3 = '0, o3;
  aes_enc_regular u3 (.clk, .rst_n, .start(s3), .din(i3), .key(key_e), .dout(o3), .dout_valid(v3), .busy(b3));
  // regular decryption
  logic s4 = 0, k4 = 0, r4, v4, b4; logic [31:0] i4 = '0, o4;
  aes_dec_regular u4 (.clk, .rst_n, .key_setup(k4), .key(key_d), .key_ready(r4), .start(s4), .din(i4), .dout(o4), .dout_valid(v4), .busy(b4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  int se [NBLK];   // clock edge that sampled each start

  task automatic report(string name, int period, real mhz);
    real cyc;
    cyc = real'(se[NBLK-1] - se[0]) / real'(NBLK - 1);
    checks++;
    if (cyc != real'(period)) begin failures++; $display("FAIL %s: %f cycles per block, expected %0d", name, cyc, period); end
    $display("%s: %0.2f cycles per block, %0.1f Mbit/s at %0.1f MHz", name, cyc, 128.0 * mhz / cyc, mhz);
  endtask

  // 128-bit cores: the next start goes into the cycle in which done is high
  task automatic stream_iter(bit dec);
    for (int n = 0; n < NBLK; n++) begin
      if (!dec) begin i1 = blk[n]; s1 = 1; end
      else      begin i2 = blk[n]; s2 = 1; end
      se[n] = edge_no + 1;
      @(negedge clk); s1 = 0; s2 = 0;
      while (!(dec ? d2 : d1)) @(negedge clk);
      checks++;
      if ((dec ? o2 : o1) !== (dec ? decrypt(blk[n], key_d) : encrypt(blk[n], key_e))) begin
        failures++; $display("FAIL %s block %0d", dec ? "iter dec" : "iter enc", n);
      end
    end
    report(dec ? "iterative decryption" : "iterative encryption", 12, dec ? 65.9 : 74.6);
  endtask

  // 32-bit cores: the next block's first column goes into the last output cycle
  task automatic feed(bit dec, int n);
    se[n] = edge_no + 1;
    for (int c = 0; c < 4; c++) begin
      if (!dec) begin s3 = (c == 0); i3 = blk[n][127-32*c -: 32]; end
      else      begin s4 = (c == 0); i4 = blk[n][127-32*c -: 32]; end
      @(negedge clk);
    end
    s3 = 0; s4 = 0;
  endtask

  task automatic stream_reg(bit dec);
    logic [127:0] got;
    feed(dec, 0);
    for (int n = 0; n < NBLK; n++) begin
      while (!(dec ? v4 : v3)) @(negedge clk);
      for (int c = 0; c < 4; c++) begin
        got[127-32*c -: 32] = dec ? o4 : o3;
        if (c < 3) @(negedge clk);
      end
      checks++;
      if (got !== (dec ? decrypt(blk[n], key_d) : encrypt(blk[n], key_e))) begin
        failures++; $display("FAIL %s block %0d", dec ? "regular dec" : "regular enc", n);
      end
      if (n < NBLK - 1) feed(dec, n + 1);
      else @(negedge clk);
    end
    report(dec ? "regular decryption" : "regular encryption", 17, dec ? 61.9 : 67.9);
  endtask

  initial begin
    key_e = KAT_KEY0; key_d = rand128();
    for (int n = 0; n < NBLK; n++) blk[n] = rand128();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    k2 = 1; k4 = 1; @(negedge clk); k2 = 0; k4 = 0;
    while (!(r2 && r4)) @(negedge clk);
    stream_iter(0);
    stream_iter(1);
    stream_reg(0);
    stream_reg(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
