// tb_pci_mfcu_top: end-to-end test of the board logic at its default
// configuration (FPGA1 iterative encryption, FPGA2 iterative decryption,
// FPGA3 regular encryption, FPGA4 regular decryption), driven only through
// the local-bus pins the way the host reaches the board via the PCI
// controller.
//   1. enables the interrupt of all four FPGAs;
//   2. plays JTAG bit strings into a model of the FPGA2..4 chain (three
//      devices in BYPASS) and checks the TDO bits read back;
//   3. loads a key into every FPGA and runs key setup on the decryption ones;
//   4. loads four blocks, starts all four cores, checks that none has
//      finished when the last one was started (all four run at once), waits
//      for the interrupt, polls INT_STAT and reads and checks all results;
//   5. repeats step 4 with new data and keys, including the standard's
//      known-answer block, and writes extra starts while the cores are busy.
// Every mechanism is counted and a failure is counted for one that never
// happened.
module tb_pci_mfcu_top;
  import aes_ref_pkg::*;
  logic lclk = 0, lreset_n = 0, wr_n = 1, rd_n = 1;
  logic [11:0] la = '0;
  logic [15:0] ld_in = '0, ld_out;
  logic ld_oe, int_o, jtag_tck, jtag_tms, jtag_tdi, jtag_tdo;
  int checks = 0, failures = 0;

  pci_mfcu_top dut (.*);

  always #15 lclk = ~lclk;   // 33 MHz local clock

  // JTAG chain of FPGA2..4 in BYPASS
  logic [2:0] chain = '0;
  logic tdo_q = 0;
  always @(posedge jtag_tck) chain <= {chain[1:0], jtag_tdi};
  always @(negedge jtag_tck) tdo_q <= chain[2];
  assign jtag_tdo = tdo_q;

  // mechanism counters
  int n_done [4] = '{0, 0, 0, 0};
  int n_key_setup = 0, n_concurrent = 0, n_interrupt = 0, n_jtag = 0, n_busy_start = 0;
  logic int_q = 0;
  always @(posedge lclk) begin
    int_q <= int_o;
    if (int_o && !int_q) n_interrupt++;
  end

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [11:0] a, logic [15:0] d);
    @(negedge lclk); la = a; ld_in = d; wr_n = 0;
    @(negedge lclk); wr_n = 1;
  endtask

  task automatic rd(logic [11:0] a, output logic [15:0] d);
    @(negedge lclk); la = a; rd_n = 0;
    #1;
    d = ld_out;
    checks++;
    if (!ld_oe) begin failures++; $display("FAIL ld_oe low on read of %03h", a); end
    @(negedge lclk); rd_n = 1;
  endtask

  function automatic logic [11:0] fpga(int n, int off);
    return 12'(n * 256 + off);
  endfunction

  task automatic wr_block(int n, int base, logic [127:0] v);
    for (int w = 0; w < 8; w++) wr(fpga(n, base + w), v[127-16*w -: 16]);
  endtask

  task automatic rd_block(int n, int base, output logic [127:0] v);
    logic [15:0] d;
    for (int w = 0; w < 8; w++) begin rd(fpga(n, base + w), d); v[127-16*w -: 16] = d; end
  endtask

  task automatic set_keys(logic [127:0] k);
    logic [15:0] s;
    for (int n = 0; n < 4; n++) wr_block(n, 8, k);
    wr(fpga(1, 24), 16'h0002);
    wr(fpga(3, 24), 16'h0002);
    for (int n = 1; n < 4; n += 2) begin
      int polls = 0;
      do begin rd(fpga(n, 25), s); polls++; end while (!s[2] && polls < 100);
      checks++;
      if (!s[2]) begin failures++; $display("FAIL key setup FPGA%0d", n + 1); end
      else n_key_setup++;
    end
  endtask

  task automatic run_all(logic [127:0] k, logic [127:0] pt, logic [127:0] ct);
    logic [15:0] s;
    logic [127:0] got;
    logic [127:0] exp [4];
    int polls;
    exp = '{ct, pt, ct, pt};
    wr_block(0, 0, pt); wr_block(1, 0, ct); wr_block(2, 0, pt); wr_block(3, 0, ct);
    // start the slow regular cores first, then the iterative ones
    wr(fpga(2, 24), 1); wr(fpga(3, 24), 1); wr(fpga(0, 24), 1); wr(fpga(1, 24), 1);
    wr(fpga(2, 24), 1); n_busy_start++;          // ignored: FPGA3 busy
    rd(12'h401, s);
    checks++;
    if (s[3:0] != 4'h0) begin failures++; $display("FAIL done flags %b right after the starts", s[3:0]); end
    else n_concurrent++;
    polls = 0;
    while (!int_o && polls < 200) begin @(negedge lclk); polls++; end
    checks++;
    if (!int_o) begin failures++; $display("FAIL no interrupt"); end
    polls = 0;
    do begin rd(12'h401, s); polls++; end while (s[3:0] != 4'hf && polls < 100);
    checks++;
    if (s[3:0] != 4'hf) begin failures++; $display("FAIL done flags %b", s[3:0]); end
    for (int n = 0; n < 4; n++) begin
      rd_block(n, 16, got);
      checks++;
      if (got !== exp[n]) begin failures++; $display("FAIL FPGA%0d got %h exp %h", n + 1, got, exp[n]); end
      else n_done[n]++;
    end
  endtask

  bit history [$];

  initial begin
    logic [15:0] s;
    logic [127:0] k, p;
    repeat (3) history.push_back(0);
    repeat (3) @(posedge lclk);
    lreset_n = 1;
    wr(12'h400, 16'h000f);
    // JTAG configuration stream
    for (int t = 0; t < 8; t++) begin
      logic [7:0] tdiv;
      logic [7:0] expo;
      tdiv = 8'($urandom);
      wr(12'h410, {5'd0, 3'd7, 8'($urandom)});
      wr(12'h411, {8'd0, tdiv});
      do rd(12'h412, s); while (s[15]);
      for (int b = 0; b < 8; b++) begin expo[b] = history[history.size() - 3]; history.push_back(tdiv[b]); end
      checks++;
      if (s[7:0] != expo) begin failures++; $display("FAIL TDO %b exp %b", s[7:0], expo); end
      else n_jtag++;
    end
    // AES on all four FPGAs
    set_keys(KAT_KEY0);
    run_all(KAT_KEY0, KAT_PT0, KAT_CT0);
    for (int t = 0; t < 3; t++) begin
      k = rand128(); p = rand128();
      set_keys(k);
      run_all(k, p, encrypt(p, k));
    end
    // every mechanism must have happened
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (n_done[n] == 0) begin failures++; $display("FAIL FPGA%0d never completed a block", n + 1); end
    end
    checks++; if (n_key_setup == 0)  begin failures++; $display("FAIL no key setup"); end
    checks++; if (n_concurrent == 0) begin failures++; $display("FAIL four cores never ran together"); end
    checks++; if (n_interrupt == 0)  begin failures++; $display("FAIL no interrupt edge"); end
    checks++; if (n_jtag == 0)       begin failures++; $display("FAIL no JTAG shift"); end
    checks++; if (n_busy_start == 0) begin failures++; $display("FAIL no start while busy"); end
    $display("mechanisms: blocks %0d/%0d/%0d/%0d key setups %0d concurrent %0d interrupts %0d jtag %0d busy starts %0d",
             n_done[0], n_done[1], n_done[2], n_done[3], n_key_setup, n_concurrent, n_interrupt, n_jtag, n_busy_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
