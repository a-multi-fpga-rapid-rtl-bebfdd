// tb_pci_mfcu_uniform: the multi-AES configuration in which all four FPGAs
// are loaded with the same core. Four boards are built, one per core kind
// (iterative encryption, iterative decryption, regular encryption, regular
// decryption, each in all four FPGAs). On every board, through the local-bus
// pins only, four different blocks are loaded, all four cores are started,
// and after the interrupt all four results are read back and checked against
// the reference, with a different key per FPGA.
module tb_pci_mfcu_uniform;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic lclk = 0, lreset_n = 0;
  logic        wr_n [4], rd_n [4];
  logic [11:0] la [4];
  logic [15:0] ld_in [4], ld_out [4];
  logic        ld_oe [4], int_o [4], tck [4], tms [4], tdi [4];
  int checks = 0, failures = 0;
  int n_blocks [4] = '{0, 0, 0, 0};

  localparam core_kind_e KINDS [4] = '{CORE_ITER_ENC, CORE_ITER_DEC, CORE_REG_ENC, CORE_REG_DEC};

  for (genvar b = 0; b < 4; b++) begin : g_board
    pci_mfcu_top #(.KIND1(KINDS[b]), .KIND2(KINDS[b]), .KIND3(KINDS[b]), .KIND4(KINDS[b])) dut (
      .lclk(lclk), .lreset_n(lreset_n), .la(la[b]), .ld_in(ld_in[b]), .ld_out(ld_out[b]),
      .ld_oe(ld_oe[b]), .wr_n(wr_n[b]), .rd_n(rd_n[b]), .int_o(int_o[b]),
      .jtag_tck(tck[b]), .jtag_tms(tms[b]), .jtag_tdi(tdi[b]), .jtag_tdo(1'b0));
  end

  always #15 lclk = ~lclk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int b, logic [11:0] a, logic [15:0] d);
    @(negedge lclk); la[b] = a; ld_in[b] = d; wr_n[b] = 0;
    @(negedge lclk); wr_n[b] = 1;
  endtask

  task automatic rd(int b, logic [11:0] a, output logic [15:0] d);
    @(negedge lclk); la[b] = a; rd_n[b] = 0;
    #1 d = ld_out[b];
    @(negedge lclk); rd_n[b] = 1;
  endtask

  task automatic run_board(int b);
    logic [127:0] k [4], x [4], exp [4], got;
    logic [15:0] s;
    int polls;
    bit dec;
    dec = (b == 1 || b == 3);
    wr(b, 12'h400, 16'h000f);
    for (int f = 0; f < 4; f++) begin
      k[f] = rand128(); x[f] = rand128();
      exp[f] = dec ? decrypt(x[f], k[f]) : encrypt(x[f], k[f]);
      for (int w = 0; w < 8; w++) wr(b, 12'(f * 256 + 8 + w), k[f][127-16*w -: 16]);
      if (dec) wr(b, 12'(f * 256 + 24), 16'h0002);
      for (int w = 0; w < 8; w++) wr(b, 12'(f * 256 + w), x[f][127-16*w -: 16]);
    end
    if (dec) for (int f = 0; f < 4; f++) begin
      polls = 0;
      do begin rd(b, 12'(f * 256 + 25), s); polls++; end while (!s[2] && polls < 50);
      checks++;
      if (!s[2]) begin failures++; $display("FAIL board %0d FPGA%0d key setup", b, f + 1); end
    end
    for (int f = 0; f < 4; f++) wr(b, 12'(f * 256 + 24), 16'h0001);
    polls = 0;
    while (!int_o[b] && polls < 100) begin @(negedge lclk); polls++; end
    polls = 0;
    do begin rd(b, 12'h401, s); polls++; end while (s[3:0] != 4'hf && polls < 100);
    checks++;
    if (s[3:0] != 4'hf) begin failures++; $display("FAIL board %0d done flags %b", b, s[3:0]); end
    for (int f = 0; f < 4; f++) begin
      for (int w = 0; w < 8; w++) begin rd(b, 12'(f * 256 + 16 + w), s); got[127-16*w -: 16] = s; end
      checks++;
      if (got !== exp[f]) begin failures++; $display("FAIL board %0d FPGA%0d got %h exp %h", b, f + 1, got, exp[f]); end
      else n_blocks[b]++;
    end
  endtask

  initial begin
    for (int b = 0; b < 4; b++) begin wr_n[b] = 1; rd_n[b] = 1; la[b] = '0; ld_in[b] = '0; end
    repeat (3) @(posedge lclk);
    lreset_n = 1;
    for (int rep = 0; rep < 2; rep++)
      for (int b = 0; b < 4; b++) run_board(b);
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (n_blocks[b] != 8) begin failures++; $display("FAIL board %0d completed %0d blocks", b, n_blocks[b]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
