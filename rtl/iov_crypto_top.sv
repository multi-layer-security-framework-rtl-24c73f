// Two-layer (AES-128 then DES) secure link: transmit and receive chains side by side.
//
// iov_tx encrypts a serial plaintext stream block by block (AES-128 on 128 bits, then DES on
// each 64-bit half with its own key and S-box slot order) and buffers the ciphertext;
// iov_rx takes a serial ciphertext stream, undoes the two DES branches and then AES, and
// buffers the plaintext. The two chains share only the board clock and reset; each has its
// own keys, serial input, buffer read port and status outputs, so they can serve the two ends
// of a link or, with the transmit buffer serialised back into rx_ser_in, a loop-back test.
// Both run their cipher stages at clk/DIV (DIV = 4: 12.5 MHz from a 50 MHz board clock).
module iov_crypto_top #(
  parameter int unsigned DIV       = 4,
  parameter int unsigned BUF_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // transmit (encryption) chain
  input  logic                        tx_ser_in,
  input  logic                        tx_ser_valid,
  input  iov_pkg::block128_t          tx_aes_key,
  input  logic                        tx_aes_key_load,
  input  iov_pkg::block64_t           tx_des_key_hi,
  input  iov_pkg::block64_t           tx_des_key_lo,
  input  logic                        tx_buf_rd_en,
  output iov_pkg::block128_t          tx_buf_rd_data,
  output logic                        tx_buf_empty,
  output logic                        tx_buf_full,
  output logic [$clog2(BUF_DEPTH):0]  tx_buf_count,
  output logic                        tx_key_ready,
  output logic                        tx_clk_slow,
  output logic                        tx_ce_slow,
  output logic                        tx_s2p_overrun,
  output logic                        tx_pack_overflow,
  output logic [15:0]                 tx_pack_drops,
  // receive (decryption) chain
  input  logic                        rx_ser_in,
  input  logic                        rx_ser_valid,
  input  iov_pkg::block128_t          rx_aes_key,
  input  logic                        rx_aes_key_load,
  input  iov_pkg::block64_t           rx_des_key_hi,
  input  iov_pkg::block64_t           rx_des_key_lo,
  input  logic                        rx_buf_rd_en,
  output iov_pkg::block128_t          rx_buf_rd_data,
  output logic                        rx_buf_empty,
  output logic                        rx_buf_full,
  output logic [$clog2(BUF_DEPTH):0]  rx_buf_count,
  output logic                        rx_key_ready,
  output logic                        rx_clk_slow,
  output logic                        rx_ce_slow,
  output logic                        rx_s2p_overrun,
  output logic                        rx_pack_overflow,
  output logic [15:0]                 rx_pack_drops
);
  iov_tx #(.DIV(DIV), .BUF_DEPTH(BUF_DEPTH)) u_tx (
    .clk, .rst_n,
    .ser_in(tx_ser_in), .ser_valid(tx_ser_valid),
    .aes_key(tx_aes_key), .aes_key_load(tx_aes_key_load),
    .des_key_hi(tx_des_key_hi), .des_key_lo(tx_des_key_lo),
    .buf_rd_en(tx_buf_rd_en), .buf_rd_data(tx_buf_rd_data), .buf_empty(tx_buf_empty),
    .buf_full(tx_buf_full), .buf_count(tx_buf_count), .key_ready(tx_key_ready),
    .clk_slow(tx_clk_slow), .ce_slow(tx_ce_slow), .s2p_overrun(tx_s2p_overrun),
    .pack_overflow(tx_pack_overflow), .pack_drops(tx_pack_drops));

  iov_rx #(.DIV(DIV), .BUF_DEPTH(BUF_DEPTH)) u_rx (
    .clk, .rst_n,
    .ser_in(rx_ser_in), .ser_valid(rx_ser_valid),
    .aes_key(rx_aes_key), .aes_key_load(rx_aes_key_load),
    .des_key_hi(rx_des_key_hi), .des_key_lo(rx_des_key_lo),
    .buf_rd_en(rx_buf_rd_en), .buf_rd_data(rx_buf_rd_data), .buf_empty(rx_buf_empty),
    .buf_full(rx_buf_full), .buf_count(rx_buf_count), .key_ready(rx_key_ready),
    .clk_slow(rx_clk_slow), .ce_slow(rx_ce_slow), .s2p_overrun(rx_s2p_overrun),
    .pack_overflow(rx_pack_overflow), .pack_drops(rx_pack_drops));
endmodule
