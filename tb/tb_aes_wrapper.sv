// tb_aes_wrapper: one wrapper of each core kind on a shared local bus.
// Through the register map only, it loads keys and blocks, runs key setup on
// the decryption cores, starts the cores, polls the status register, reads
// the results back and compares them with the reference. Also checks the
// register read-back, the kind field, the done flag clearing on a new start
// and that a start written while busy is ignored.
module tb_aes_wrapper;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, wr_n = 1, rd_n = 1;
  logic [3:0] cs = '0;
  logic [4:0] addr = '0;
  logic [15:0] wdata = '0;
  logic [15:0] rdata [4];
  logic [3:0] done_flag;
  int checks = 0, failures = 0;

  localparam core_kind_e KINDS [4] = '{CORE_ITER_ENC, CORE_ITER_DEC, CORE_REG_ENC, CORE_REG_DEC};

  for (genvar n = 0; n < 4; n++) begin : g_w
    aes_wrapper #(.KIND(KINDS[n])) dut (
      .clk(clk), .rst_n(rst_n), .cs(cs[n]), .wr_n(wr_n), .rd_n(rd_n), .addr(addr),
      .wdata(wdata), .rdata(rdata[n]), .done_flag(done_flag[n]));
  end

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int n, logic [4:0] a, logic [15:0] d);
    @(negedge clk); cs = 4'b1 << n; addr = a; wdata = d; wr_n = 0;
    @(negedge clk); wr_n = 1; cs = '0;
  endtask

  task automatic rd(int n, logic [4:0] a, output logic [15:0] d);
    @(negedge clk); cs = 4'b1 << n; addr = a; rd_n = 0;
    #1 d = rdata[n];
    @(negedge clk); rd_n = 1; cs = '0;
  endtask

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic load_block(int n, logic [4:0] base, logic [127:0] v);
    for (int w = 0; w < 8; w++) wr(n, base + 5'(w), v[127-16*w -: 16]);
  endtask

  task automatic read_block(int n, logic [4:0] base, output logic [127:0] v);
    logic [15:0] d;
    for (int w = 0; w < 8; w++) begin rd(n, base + 5'(w), d); v[127-16*w -: 16] = d; end
  endtask

  task automatic wait_status(int n, int bitno);
    logic [15:0] s;
    int polls = 0;
    do begin rd(n, 5'd25, s); polls++; end while (!s[bitno] && polls < 200);
    checks++;
    if (!s[bitno]) begin failures++; $display("FAIL wrapper %0d status bit %0d never set", n, bitno); end
  endtask

  task automatic run(int n, logic [127:0] k, logic [127:0] blk, logic [127:0] exp, bit new_key);
    logic [127:0] got;
    logic [15:0] s;
    if (new_key) begin
      load_block(n, 5'd8, k);
      if (n == 1 || n == 3) begin wr(n, 5'd24, 16'h0002); wait_status(n, 2); end
    end
    load_block(n, 5'd0, blk);
    wr(n, 5'd24, 16'h0001);
    rd(n, 5'd25, s);
    checks++;
    if (s[0] || !s[1]) begin failures++; $display("FAIL wrapper %0d status %h right after start", n, s); end
    wr(n, 5'd0, 16'h0000);        // the block register may change once the core has it
    wr(n, 5'd24, 16'h0001);       // ignored while busy
    wait_status(n, 0);
    read_block(n, 5'd16, got);
    check(got, exp, $sformatf("wrapper %0d result", n));
  endtask

  initial begin
    logic [127:0] v, k, p;
    logic [15:0] s;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      rd(n, 5'd25, s);
      checks++;
      if (s[5:4] != 2'(KINDS[n]) || s[0]) begin failures++; $display("FAIL wrapper %0d status %h", n, s); end
      load_block(n, 5'd8, KAT_KEY1);
      read_block(n, 5'd8, v);
      check(v, KAT_KEY1, "key read-back");
    end
    run(0, KAT_KEY0, KAT_PT0, KAT_CT0, 1);
    run(1, KAT_KEY0, KAT_CT0, KAT_PT0, 1);
    run(2, KAT_KEY0, KAT_PT0, KAT_CT0, 1);
    run(3, KAT_KEY0, KAT_CT0, KAT_PT0, 1);
    for (int t = 0; t < 4; t++) begin
      k = rand128();
      for (int m = 0; m < 2; m++) begin
        p = rand128();
        run(0, k, p, encrypt(p, k), m == 0);
        run(1, k, p, decrypt(p, k), m == 0);
        run(2, k, p, encrypt(p, k), m == 0);
        run(3, k, p, decrypt(p, k), m == 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
