// End-to-end testbench for iov_crypto_top at its default parameters (DIV = 4, 16-block
// buffers). Plaintext goes serially into the transmit chain; a drain process reads the
// ciphertext buffer, and a loop-back process sends each ciphertext block serially into the
// receive chain, whose buffer is read and compared with the original plaintext.
//   Phase 1: the four reference blocks; the ciphertext is also compared with values from an
//            independent software model of the two-layer cipher.
//   Phase 2: 24 random blocks streamed back to back with no gap: nothing may be lost.
//   Phase 3: the transmit buffer is not read while 22 blocks are sent: the buffer fills, the
//            cipher stages stall and the packer drops blocks; once draining resumes, every
//            block that survived must still decrypt, in order.
// Each mechanism (slow-rate enable, byte assembly, AES, both DES branches per direction,
// buffer write, buffer full, stall, packer drop) is counted; one that never happened fails.
module tb_iov_crypto_top;
  import iov_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_ser_in = 1'b0, tx_ser_valid = 1'b0, tx_aes_key_load = 1'b0, tx_buf_rd_en = 1'b0;
  logic rx_ser_in = 1'b0, rx_ser_valid = 1'b0, rx_aes_key_load = 1'b0, rx_buf_rd_en = 1'b0;
  block128_t tx_aes_key = 128'h000102030405060708090a0b0c0d0e0f, rx_aes_key;
  block64_t tx_des_key_hi = 64'h133457799bbcdff1, tx_des_key_lo = 64'h0e329232ea6d0d73;
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

  localparam block128_t PT [4] = '{128'h00112233445566778899aabbccddeeff,
                                   128'h01102332455467768998abbacddceffe,
                                   128'h02132031465764758a9ba8b9cedfecfd,
                                   128'h03122130475665748b9aa9b8cfdeedfc};
  localparam block128_t CT [4] = '{128'h34660ff64751e8d69ee9f14fe06e280f,
                                   128'hc6192f01af7c2414da95a12f28280b45,
                                   128'hb33d1e4fcace250b42ee578198c36b2f,
                                   128'h3dab5ced75fbacd88230ed68edacb58a};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_ce = 0, n_bytes = 0, n_aes_enc = 0, n_des_enc_hi = 0, n_des_enc_lo = 0, n_tx_wr = 0;
  int n_full = 0, n_stall = 0, n_drop = 0, n_des_dec_hi = 0, n_des_dec_lo = 0, n_aes_dec = 0;
  int n_rx_wr = 0;
  always @(negedge clk) if (rst_n) begin
    if (tx_ce_slow) n_ce++;
    if (tx_ce_slow && dut.u_tx.byte_valid) n_bytes++;
    if (tx_ce_slow && dut.u_tx.blk_valid && dut.u_tx.blk_ready) n_aes_enc++;
    if (tx_ce_slow && dut.u_tx.des_in_valid && dut.u_tx.des_hi_rdy) n_des_enc_hi++;
    if (tx_ce_slow && dut.u_tx.des_in_valid && dut.u_tx.des_lo_rdy) n_des_enc_lo++;
    if (tx_ce_slow && dut.u_tx.buf_wr_valid) n_tx_wr++;
    if (tx_buf_full) n_full++;
    if (tx_ce_slow && dut.u_tx.des_hi_vld && !dut.u_tx.buf_ready) n_stall++;
    if (tx_pack_overflow) n_drop++;
    if (rx_ce_slow && dut.u_rx.des_in_valid && dut.u_rx.des_hi_rdy) n_des_dec_hi++;
    if (rx_ce_slow && dut.u_rx.des_in_valid && dut.u_rx.des_lo_rdy) n_des_dec_lo++;
    if (rx_ce_slow && dut.u_rx.aes_in_valid && dut.u_rx.aes_in_ready) n_aes_dec++;
    if (rx_ce_slow && dut.u_rx.aes_valid && dut.u_rx.buf_ready) n_rx_wr++;
  end

  // ---------------------------------------------------------------- drain and loop-back
  bit tx_drain = 1'b1;
  block128_t loop_q [$], ct_seen [$], rx_got [$];

  always @(negedge clk) begin
    tx_buf_rd_en <= 1'b0;
    rx_buf_rd_en <= 1'b0;
    if (rst_n && tx_drain && !tx_buf_empty && !tx_buf_rd_en) begin
      loop_q.push_back(tx_buf_rd_data);
      ct_seen.push_back(tx_buf_rd_data);
      tx_buf_rd_en <= 1'b1;
    end
    if (rst_n && !rx_buf_empty && !rx_buf_rd_en) begin
      rx_got.push_back(rx_buf_rd_data);
      rx_buf_rd_en <= 1'b1;
    end
  end

  initial begin
    block128_t b;
    forever begin
      @(negedge clk);
      if (loop_q.size() != 0) begin
        b = loop_q.pop_front();
        for (int i = 127; i >= 0; i--) begin
          rx_ser_in = b[i]; rx_ser_valid = 1'b1;
          @(negedge clk);
        end
        rx_ser_valid = 1'b0;
      end
    end
  end

  task automatic send_block(input block128_t b);
    for (int i = 127; i >= 0; i--) begin
      @(negedge clk);
      tx_ser_in = b[i]; tx_ser_valid = 1'b1;
    end
  endtask

  task automatic idle(input int n);
    @(negedge clk);
    tx_ser_valid = 1'b0;
    repeat (n) @(negedge clk);
  endtask

  // Wait until the receive side has delivered n blocks in all (or give up).
  task automatic wait_rx(input int n);
    int t = 0;
    while (rx_got.size() < n && t < 20000) begin @(negedge clk); t++; end
  endtask

  initial begin
    block128_t sent [$];
    block128_t r;
    int skipped;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); tx_aes_key_load = 1'b1; rx_aes_key_load = 1'b1;
    @(negedge clk); tx_aes_key_load = 1'b0; rx_aes_key_load = 1'b0;
    while (!(tx_key_ready && rx_key_ready)) @(negedge clk);

    // Phase 1
    for (int i = 0; i < 4; i++) begin send_block(PT[i]); sent.push_back(PT[i]); end
    idle(10);
    wait_rx(4);
    check(ct_seen.size() == 4, $sformatf("phase 1: %0d ciphertext blocks", ct_seen.size()));
    for (int i = 0; i < 4 && i < ct_seen.size(); i++)
      check(ct_seen[i] == CT[i], $sformatf("ciphertext %0d: got %h exp %h", i, ct_seen[i], CT[i]));

    // Phase 2
    for (int i = 0; i < 24; i++) begin
      r = {$urandom, $urandom, $urandom, $urandom};
      send_block(r); sent.push_back(r);
    end
    idle(10);
    wait_rx(28);
    check(rx_got.size() == 28 && tx_pack_drops == 0 && rx_pack_drops == 0,
          $sformatf("phase 2: %0d blocks back, %0d dropped", rx_got.size(), tx_pack_drops));
    check(!tx_s2p_overrun && !rx_s2p_overrun, "no serial overrun");
    for (int i = 0; i < 28 && i < rx_got.size(); i++)
      check(rx_got[i] == sent[i], $sformatf("round trip %0d: got %h exp %h", i, rx_got[i], sent[i]));

    // Phase 3: 16 in the buffer, 1 in the DES pair, 1 in AES, 1 held by the packer.
    tx_drain = 1'b0;
    for (int i = 0; i < 22; i++) begin
      r = {$urandom, $urandom, $urandom, $urandom};
      send_block(r); sent.push_back(r);
    end
    idle(300);
    check(tx_pack_drops == 3, $sformatf("phase 3: packer dropped %0d blocks, expected 3", tx_pack_drops));
    tx_drain = 1'b1;
    wait_rx(28 + 19);
    check(rx_got.size() == 47, $sformatf("phase 3: %0d blocks back in all", rx_got.size()));
    // Every block that came back must be the next surviving one that was sent.
    skipped = 0;
    for (int i = 28; i < rx_got.size(); i++) begin
      while (sent.size() > i + skipped && rx_got[i] != sent[i + skipped]) skipped++;
      check(sent.size() > i + skipped, $sformatf("block %0d back matches nothing sent", i));
    end
    check(sent.size() - rx_got.size() == int'(tx_pack_drops),
          $sformatf("%0d blocks missing, %0d dropped", sent.size() - rx_got.size(), tx_pack_drops));
    check(skipped <= int'(tx_pack_drops), $sformatf("skipped %0d blocks, dropped %0d", skipped, tx_pack_drops));

    $display("MECH slow_enable=%0d bytes=%0d aes_enc=%0d des_enc_hi=%0d des_enc_lo=%0d tx_buf_writes=%0d",
             n_ce, n_bytes, n_aes_enc, n_des_enc_hi, n_des_enc_lo, n_tx_wr);
    $display("MECH buffer_full=%0d stall=%0d packer_drop=%0d des_dec_hi=%0d des_dec_lo=%0d aes_dec=%0d rx_buf_writes=%0d",
             n_full, n_stall, n_drop, n_des_dec_hi, n_des_dec_lo, n_aes_dec, n_rx_wr);
    check(n_ce > 0, "slow-rate enable never pulsed");
    check(n_bytes > 0, "no byte assembled");
    check(n_aes_enc > 0 && n_des_enc_hi > 0 && n_des_enc_lo > 0, "an encryption stage never ran");
    check(n_tx_wr > 0 && n_rx_wr > 0, "a buffer was never written");
    check(n_full > 0, "buffer never full");
    check(n_stall > 0, "cipher stages never stalled");
    check(n_drop > 0, "packer never dropped a block");
    check(n_des_dec_hi > 0 && n_des_dec_lo > 0 && n_aes_dec > 0, "a decryption stage never ran");
    check(n_des_enc_hi == n_des_enc_lo && n_des_dec_hi == n_des_dec_lo, "DES branches ran unequally");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
