// Workload testbench: an image sent through the link the way the lab test does, as a stream
// of 8-bit pixel values, encrypted by the transmit chain and decrypted by the receive chain.
// The 64 x 64 greyscale test image is generated here: a diagonal gradient with a flat square
// in one corner, pixel (x, y) = (x + 2y) mod 256, or 0x80 inside the square. Its 4096 bytes
// (256 blocks) are sent in raster order with no gap at the full serial rate, the ciphertext
// is looped back serially into the receiver, and the testbench checks:
//   - no block is lost in either direction at the default DIV = 4 (the chains keep up);
//   - every recovered pixel equals the original;
//   - the ciphertext differs from the plaintext in every block;
//   - equal plaintext blocks (the flat square) give equal ciphertext and blocks that differ
//     give different ciphertext, as a block cipher used block by block must.
module tb_image_stream;
  import iov_pkg::*;
  localparam int W = 64, H = 64, NBLK = W * H / 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_ser_in = 1'b0, tx_ser_valid = 1'b0, tx_aes_key_load = 1'b0, tx_buf_rd_en = 1'b0;
  logic rx_ser_in = 1'b0, rx_ser_valid = 1'b0, rx_aes_key_load = 1'b0, rx_buf_rd_en = 1'b0;
  block128_t tx_aes_key = 128'h2b7e151628aed2a6abf7158809cf4f3c, rx_aes_key;
  block64_t tx_des_key_hi = 64'h0123456789abcdef, tx_des_key_lo = 64'hfedcba9876543210;
  block64_t rx_des_key_hi, rx_des_key_lo;
  block128_t tx_buf_rd_data, rx_buf_rd_data;
  logic tx_buf_empty, tx_buf_full, tx_key_ready, tx_clk_slow, tx_ce_slow, tx_s2p_overrun, tx_pack_overflow;
  logic rx_buf_empty, rx_buf_full, rx_key_ready, rx_clk_slow, rx_ce_slow, rx_s2p_overrun, rx_pack_overflow;
  logic [4:0] tx_buf_count, rx_buf_count;
  logic [15:0] tx_pack_drops, rx_pack_drops;
  int checks = 0, failures = 0;

  assign rx_aes_key = tx_aes_key;
  assign rx_des_key_hi = tx_des_key_hi;
  assign rx_des_key_lo = tx_des_key_lo;

  always #10 clk = ~clk;

  iov_crypto_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic byte_t pixel(input int x, input int y);
    if (x < 32 && y < 16) return 8'h80;
    return byte_t'(x + 2 * y);
  endfunction

  function automatic block128_t image_block(input int n);
    block128_t b;
    int p;
    for (int i = 0; i < 16; i++) begin
      p = 16 * n + i;
      b[127 - 8*i -: 8] = pixel(p % W, p / W);
    end
    return b;
  endfunction

  block128_t loop_q [$], ct [$], pt_back [$];

  always @(negedge clk) begin
    tx_buf_rd_en <= 1'b0;
    rx_buf_rd_en <= 1'b0;
    if (rst_n && !tx_buf_empty && !tx_buf_rd_en) begin
      loop_q.push_back(tx_buf_rd_data);
      ct.push_back(tx_buf_rd_data);
      tx_buf_rd_en <= 1'b1;
    end
    if (rst_n && !rx_buf_empty && !rx_buf_rd_en) begin
      pt_back.push_back(rx_buf_rd_data);
      rx_buf_rd_en <= 1'b1;
    end
  end

  // Loop-back: ciphertext blocks go out back to back once the first is available.
  initial begin
    block128_t b;
    forever begin
      @(negedge clk);
      while (loop_q.size() != 0) begin
        b = loop_q.pop_front();
        for (int i = 127; i >= 0; i--) begin
          rx_ser_in = b[i]; rx_ser_valid = 1'b1;
          @(negedge clk);
        end
      end
      rx_ser_valid = 1'b0;
    end
  end

  initial begin
    block128_t b;
    int t = 0, same_pt = 0, same_ct_ok = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); tx_aes_key_load = 1'b1; rx_aes_key_load = 1'b1;
    @(negedge clk); tx_aes_key_load = 1'b0; rx_aes_key_load = 1'b0;
    while (!(tx_key_ready && rx_key_ready)) @(negedge clk);
    for (int n = 0; n < NBLK; n++) begin
      b = image_block(n);
      for (int i = 127; i >= 0; i--) begin
        @(negedge clk);
        tx_ser_in = b[i]; tx_ser_valid = 1'b1;
      end
    end
    @(negedge clk);
    tx_ser_valid = 1'b0;
    while (pt_back.size() < NBLK && t < 40000) begin @(negedge clk); t++; end
    check(ct.size() == NBLK, $sformatf("%0d ciphertext blocks, expected %0d", ct.size(), NBLK));
    check(pt_back.size() == NBLK, $sformatf("%0d blocks recovered, expected %0d", pt_back.size(), NBLK));
    check(tx_pack_drops == 0 && rx_pack_drops == 0 && !tx_s2p_overrun && !rx_s2p_overrun,
          "no loss at the full serial rate");
    for (int n = 0; n < NBLK && n < pt_back.size(); n++) begin
      check(pt_back[n] == image_block(n), $sformatf("block %0d recovered %h exp %h", n, pt_back[n], image_block(n)));
      if (n < ct.size()) check(ct[n] != image_block(n), $sformatf("block %0d left unencrypted", n));
    end
    for (int n = 1; n < NBLK && n < ct.size(); n++) begin
      bit eq_pt;
      eq_pt = (image_block(n) == image_block(n - 1));
      if (eq_pt) same_pt++;
      check((ct[n] == ct[n - 1]) == eq_pt, $sformatf("blocks %0d/%0d: equal plaintext %0b", n - 1, n, eq_pt));
    end
    check(same_pt > 0, "image has repeated blocks");
    $display("image %0dx%0d: %0d blocks, %0d repeated neighbours", W, H, NBLK, same_pt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
