// aes_wrapper: local-bus register interface around one AES core, one per
// FPGA of the board.
//
// The host reaches the core through the PCI controller's 16-bit local bus.
// The wrapper holds the 128-bit input block and key as eight 16-bit words
// each, starts the core, collects its result into eight output words and
// keeps a sticky done flag that the host polls (or that the control unit
// turns into an interrupt). Which core sits inside is chosen by KIND, just as
// the FPGA would be configured with one bitstream or another:
//   CORE_ITER_ENC / CORE_ITER_DEC : 128-bit iterative cores, fed in one cycle
//   CORE_REG_ENC  / CORE_REG_DEC  : 32-bit regular cores, fed one column per
//                                   cycle for four cycles, result collected
//                                   over four cycles
// Register map (word offset addr[4:0]; word 0 is the most significant):
//   0..7   DIN   r/w  input block          8..15  KEY   r/w  key
//   16..23 DOUT  r    result block         24     CTRL  w    bit0 start,
//                                                            bit1 key setup
//   25     STAT  r    bit0 done, bit1 busy, bit2 key ready, bits5:4 KIND
// A write happens once per bus access, on the first cycle in which cs and
// !wr_n are both true. Reads are combinational; rdata is 0 when not
// selected. Writing CTRL while busy is ignored. Key setup only matters for
// the decryption cores (round key 10 is precomputed); for the encryption
// cores key ready is always 1.
// The wrapper's existence and its place between core and local bus come from
// the design; the register map and handshake are this design's choices.
module aes_wrapper
  import aes_pkg::*;
#(
  parameter core_kind_e KIND = CORE_ITER_ENC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cs,
  input  logic        wr_n,
  input  logic        rd_n,
  input  logic [4:0]  addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        done_flag
);

  localparam logic [4:0] A_CTRL = 5'd24;
  localparam logic [4:0] A_STAT = 5'd25;

  block_t din_q, key_q, dout_q;
  logic   wr_n_q, wr_stb;
  logic   start_p;
  logic   core_busy, core_key_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_n_q <= 1'b1;
    else        wr_n_q <= wr_n | ~cs;
  end
  assign wr_stb   = cs && !wr_n && wr_n_q;
  assign start_p  = wr_stb && addr == A_CTRL && wdata[0] && !core_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din_q <= '0;
      key_q <= '0;
    end else if (wr_stb && !addr[4]) begin
      if (!addr[3]) din_q[127-16*addr[2:0] -: 16] <= wdata;
      else          key_q[127-16*addr[2:0] -: 16] <= wdata;
    end
  end

  // Result capture and done flag
  logic         res_valid;     // a result word (or block) arrives this cycle
  logic [1:0]   res_col;       // column index for the 32-bit cores
  logic         res_last;      // last piece of the block
  block_t       res_block;
  word_t        res_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_q    <= '0;
      done_flag <= 1'b0;
    end else begin
      if (res_valid) begin
        if (KIND == CORE_ITER_ENC || KIND == CORE_ITER_DEC) dout_q <= res_block;
        else dout_q[127-32*res_col -: 32] <= res_word;
        if (res_last) done_flag <= 1'b1;
      end
      // a start in the cycle a result completes: done then refers to the new block
      if (start_p) done_flag <= 1'b0;
    end
  end

  if (KIND == CORE_ITER_ENC || KIND == CORE_ITER_DEC) begin : g_iter
    logic done;
    assign res_col   = 2'd0;
    assign res_word  = '0;
    assign res_valid = done;
    assign res_last  = done;
    if (KIND == CORE_ITER_ENC) begin : g_enc
      aes_enc_iter u_core (
        .clk(clk), .rst_n(rst_n), .start(start_p), .din(din_q), .key(key_q),
        .dout(res_block), .done(done), .busy(core_busy));
      assign core_key_ready = 1'b1;
    end else begin : g_dec
      logic ksetup_p;
      assign ksetup_p = wr_stb && addr == A_CTRL && wdata[1] && !core_busy && !wdata[0];
      aes_dec_iter u_core (
        .clk(clk), .rst_n(rst_n), .key_setup(ksetup_p), .key(key_q),
        .key_ready(core_key_ready), .start(start_p), .din(din_q),
        .dout(res_block), .done(done), .busy(core_busy));
    end
  end else begin : g_reg
    // Feed four columns, then collect four result columns.
    logic [1:0] in_col;
    logic       feeding, core_start, dout_valid, core_busy_raw;
    word_t      core_din;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        feeding <= 1'b0;
        in_col  <= '0;
        res_col <= '0;
      end else begin
        if (start_p) begin
          feeding <= 1'b1;
          in_col  <= 2'd1;
          res_col <= 2'd0;
        end else if (feeding) begin
          in_col <= in_col + 2'd1;
          if (in_col == 2'd3) feeding <= 1'b0;
        end
        if (dout_valid) res_col <= res_col + 2'd1;
      end
    end
    assign core_start = start_p;
    assign core_din   = start_p ? din_q[127:96] : din_q[127-32*in_col -: 32];
    assign res_valid  = dout_valid;
    assign res_last   = dout_valid && res_col == 2'd3;
    assign res_block  = '0;
    assign core_busy  = core_busy_raw || feeding || dout_valid;
    if (KIND == CORE_REG_ENC) begin : g_enc
      aes_enc_regular u_core (
        .clk(clk), .rst_n(rst_n), .start(core_start), .din(core_din), .key(key_q),
        .dout(res_word), .dout_valid(dout_valid), .busy(core_busy_raw));
      assign core_key_ready = 1'b1;
    end else begin : g_dec
      logic ksetup_p;
      assign ksetup_p = wr_stb && addr == A_CTRL && wdata[1] && !core_busy && !wdata[0];
      aes_dec_regular u_core (
        .clk(clk), .rst_n(rst_n), .key_setup(ksetup_p), .key(key_q),
        .key_ready(core_key_ready), .start(core_start), .din(core_din),
        .dout(res_word), .dout_valid(dout_valid), .busy(core_busy_raw));
    end
  end

  always_comb begin
    rdata = '0;
    if (cs && !rd_n) begin
      if (addr < 5'd8)        rdata = din_q[127-16*addr[2:0] -: 16];
      else if (addr < 5'd16)  rdata = key_q[127-16*addr[2:0] -: 16];
      else if (addr < 5'd24)  rdata = dout_q[127-16*addr[2:0] -: 16];
      else if (addr == A_STAT)
        rdata = {10'd0, 2'(KIND), 1'b0, core_key_ready, core_busy, done_flag};
    end
  end

endmodule
