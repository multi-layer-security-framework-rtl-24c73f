// Receive (decryption) chain: serial ciphertext in, buffered recovered plaintext out.
//
// The mirror of iov_tx. serial_to_parallel and block_packer rebuild 128-bit ciphertext blocks
// from the serial input; the upper and lower 64-bit halves are decrypted by two des_core
// branches (DECRYPT = 1) that use the same keys and S-box slot orders as the matching
// transmit branches; the joined 128-bit result is decrypted by aes_decrypt, and the plaintext
// is written into block_buffer. freq_down_conv provides the slow-rate clock enable (DIV = 4:
// 50 MHz to 12.5 MHz). Valid/ready hand-over, back-pressure from a full buffer and the
// packer's drop rule are as in iov_tx. Per block: 16 slow cycles of DES, then 10 of AES.
// The AES key schedule is computed on aes_key_load and used in reverse order by the
// decryption core. Synchronous active-low reset. The mirrored stage order follows the design
// description; packer, key schedule, handshakes and drop policy are this design's additions.
module iov_rx #(
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
  block128_t blk, aes_in, aes_pt;
  logic blk_valid, blk_ready, aes_in_valid, aes_in_ready, aes_valid, buf_ready;
  aes_round_keys_t rk;
  block64_t des_hi_out, des_lo_out;
  logic des_hi_rdy, des_lo_rdy, des_hi_vld, des_lo_vld, des_in_valid, des_take;

  freq_down_conv #(.DIV(DIV)) u_div (.clk, .rst_n, .ce, .clk_div(clk_slow));
  assign ce_slow = ce;

  serial_to_parallel u_s2p (
    .clk, .rst_n, .ce, .ser_in, .ser_valid,
    .out_data(byte_data), .out_valid(byte_valid), .out_ready(byte_ready), .overrun(s2p_overrun));

  block_packer u_pack (
    .clk, .rst_n, .ce, .in_data(byte_data), .in_valid(byte_valid), .in_ready(byte_ready),
    .out_data(blk), .out_valid(blk_valid), .out_ready(blk_ready),
    .overflow(pack_overflow), .drop_count(pack_drops));

  // Split the ciphertext block over the two DES branches.
  assign blk_ready    = des_hi_rdy && des_lo_rdy;
  assign des_in_valid = blk_valid && blk_ready;

  des_core #(.DECRYPT(1'b1), .SBOX_SRC(DES_SBOX_SRC), .SBOX_ORDER(DES_ORDER_HI)) u_des_hi (
    .clk, .rst_n, .ce, .key(des_key_hi), .in_data(blk[127:64]), .in_valid(des_in_valid),
    .in_ready(des_hi_rdy), .out_data(des_hi_out), .out_valid(des_hi_vld), .out_ready(des_take));

  des_core #(.DECRYPT(1'b1), .SBOX_SRC(DES_SBOX_SRC), .SBOX_ORDER(DES_ORDER_LO)) u_des_lo (
    .clk, .rst_n, .ce, .key(des_key_lo), .in_data(blk[63:0]), .in_valid(des_in_valid),
    .in_ready(des_lo_rdy), .out_data(des_lo_out), .out_valid(des_lo_vld), .out_ready(des_take));

  // Join the halves into the AES ciphertext.
  assign aes_in_valid = des_hi_vld && des_lo_vld;
  assign des_take     = aes_in_valid && aes_in_ready;
  assign aes_in       = {des_hi_out, des_lo_out};

  aes_key_expand u_kexp (.clk, .rst_n, .ce, .key_load(aes_key_load), .key(aes_key), .rk, .key_ready);

  aes_decrypt u_aes (
    .clk, .rst_n, .ce, .rk, .key_ready,
    .in_data(aes_in), .in_valid(aes_in_valid), .in_ready(aes_in_ready),
    .out_data(aes_pt), .out_valid(aes_valid), .out_ready(buf_ready));

  block_buffer #(.DEPTH(BUF_DEPTH), .W(128)) u_buf (
    .clk, .rst_n, .ce, .in_data(aes_pt), .in_valid(aes_valid), .in_ready(buf_ready),
    .rd_en(buf_rd_en), .rd_data(buf_rd_data), .empty(buf_empty), .full(buf_full), .count(buf_count));

  a_branches_in_step: assert property (@(posedge clk) disable iff (!rst_n) des_hi_vld == des_lo_vld)
    else $error("iov_rx: DES branches out of step");
endmodule
