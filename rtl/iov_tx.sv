// Transmit (encryption) chain: serial plaintext in, buffered AES-then-DES ciphertext out.
//
// Data path: serial_to_parallel turns the serial input into bytes, block_packer gathers 16 of
// them into a 128-bit block, aes_encrypt encrypts it, the AES result is split into its upper
// and lower 64-bit halves, each half is encrypted by its own des_core branch, and the two
// DES outputs, upper branch in bits [127:64], are written together into block_buffer.
// freq_down_conv divides the clock by DIV (4: 50 MHz to 12.5 MHz); the divided rate is the
// clock enable of every stage after the serial input. Both DES branches take their S-boxes
// from the AES table, in a different slot order per branch (DES_ORDER_HI, DES_ORDER_LO).
//
// Stages hand blocks over with valid/ready at slow-rate edges. Both DES branches are started
// in the same cycle and, having equal latency, finish together. When the buffer is full the
// DES branches hold their results, the AES core holds its block, and the packer drops any
// block that completes meanwhile (pack_overflow, pack_drops). Per block: 16 bytes of serial
// input (128 clocks), 10 slow cycles of AES and 16 of DES, so with DIV = 4 the chain keeps
// up with a continuous serial stream. Keys: aes_key is expanded on aes_key_load; the DES keys
// are sampled when each block enters the DES branches. Synchronous active-low reset.
//
// The stage order (divider, serial-to-parallel, AES, two DES, buffer) follows the design
// description; the byte packer, the key schedule, the handshakes and the drop policy are
// this design's additions.
module iov_tx #(
  parameter int unsigned            DIV          = 4,
  parameter int unsigned            BUF_DEPTH    = 16,
  parameter iov_pkg::des_sbox_src_e DES_SBOX_SRC = iov_pkg::SBOX_AES_DERIVED,
  parameter iov_pkg::sbox_order_t   DES_ORDER_HI = iov_pkg::SBOX_ORDER_FWD,
  parameter iov_pkg::sbox_order_t   DES_ORDER_LO = iov_pkg::SBOX_ORDER_REV
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ser_in,
  input  logic                        ser_valid,
  input  iov_pkg::block128_t          aes_key,
  input  logic                        aes_key_load,
  input  iov_pkg::block64_t           des_key_hi,
  input  iov_pkg::block64_t           des_key_lo,
  input  logic                        buf_rd_en,
  output iov_pkg::block128_t          buf_rd_data,
  output logic                        buf_empty,
  output logic                        buf_full,
  output logic [$clog2(BUF_DEPTH):0]  buf_count,
  output logic                        key_ready,
  output logic                        clk_slow,
  output logic                        ce_slow,
  output logic                        s2p_overrun,
  output logic                        pack_overflow,
  output logic [15:0]                 pack_drops
);
  import iov_pkg::*;

  logic ce;
  byte_t byte_data;
  logic byte_valid, byte_ready;
  block128_t blk, aes_ct, buf_in;
  logic blk_valid, blk_ready, aes_valid, aes_ready;
  aes_round_keys_t rk;
  block64_t des_hi_out, des_lo_out;
  logic des_hi_rdy, des_lo_rdy, des_hi_vld, des_lo_vld, des_in_valid;
  logic buf_ready, buf_wr_valid;

  freq_down_conv #(.DIV(DIV)) u_div (.clk, .rst_n, .ce, .clk_div(clk_slow));
  assign ce_slow = ce;

  serial_to_parallel u_s2p (
    .clk, .rst_n, .ce, .ser_in, .ser_valid,
    .out_data(byte_data), .out_valid(byte_valid), .out_ready(byte_ready), .overrun(s2p_overrun));

  block_packer u_pack (
    .clk, .rst_n, .ce, .in_data(byte_data), .in_valid(byte_valid), .in_ready(byte_ready),
    .out_data(blk), .out_valid(blk_valid), .out_ready(blk_ready),
    .overflow(pack_overflow), .drop_count(pack_drops));

  aes_key_expand u_kexp (.clk, .rst_n, .ce, .key_load(aes_key_load), .key(aes_key), .rk, .key_ready);

  aes_encrypt u_aes (
    .clk, .rst_n, .ce, .rk, .key_ready,
    .in_data(blk), .in_valid(blk_valid), .in_ready(blk_ready),
    .out_data(aes_ct), .out_valid(aes_valid), .out_ready(aes_ready));

  // Split: both branches must be free so that they start together.
  assign aes_ready    = des_hi_rdy && des_lo_rdy;
  assign des_in_valid = aes_valid && aes_ready;

  des_core #(.DECRYPT(1'b0), .SBOX_SRC(DES_SBOX_SRC), .SBOX_ORDER(DES_ORDER_HI)) u_des_hi (
    .clk, .rst_n, .ce, .key(des_key_hi), .in_data(aes_ct[127:64]), .in_valid(des_in_valid),
    .in_ready(des_hi_rdy), .out_data(des_hi_out), .out_valid(des_hi_vld), .out_ready(buf_wr_valid));

  des_core #(.DECRYPT(1'b0), .SBOX_SRC(DES_SBOX_SRC), .SBOX_ORDER(DES_ORDER_LO)) u_des_lo (
    .clk, .rst_n, .ce, .key(des_key_lo), .in_data(aes_ct[63:0]), .in_valid(des_in_valid),
    .in_ready(des_lo_rdy), .out_data(des_lo_out), .out_valid(des_lo_vld), .out_ready(buf_wr_valid));

  // Join: write the concatenated halves once both branches are done and the buffer has room.
  assign buf_wr_valid = des_hi_vld && des_lo_vld && buf_ready;
  assign buf_in       = {des_hi_out, des_lo_out};

  block_buffer #(.DEPTH(BUF_DEPTH), .W(128)) u_buf (
    .clk, .rst_n, .ce, .in_data(buf_in), .in_valid(buf_wr_valid), .in_ready(buf_ready),
    .rd_en(buf_rd_en), .rd_data(buf_rd_data), .empty(buf_empty), .full(buf_full), .count(buf_count));

  a_branches_in_step: assert property (@(posedge clk) disable iff (!rst_n) des_hi_vld == des_lo_vld)
    else $error("iov_tx: DES branches out of step");
endmodule
