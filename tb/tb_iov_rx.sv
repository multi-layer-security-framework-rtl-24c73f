// Testbench for iov_rx: receives the four reference ciphertext blocks over the serial input and checks that the buffered plaintext is the original.
// It also measures the latency from the last serial bit of a block to its arrival in the
// buffer (expected 28..32 slow cycles: packing, 10 AES rounds, 16 DES rounds and the
// hand-overs), and, with a 4-entry buffer that is not read, checks that the buffer fills,
// the cipher stages stall and the packer drops the blocks that cannot be held.
module tb_iov_rx;
  import iov_pkg::*;
  localparam int BUF_DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ser_in = 1'b0, ser_valid = 1'b0, aes_key_load = 1'b0, buf_rd_en = 1'b0;
  block128_t aes_key = 128'h000102030405060708090a0b0c0d0e0f, buf_rd_data;
  block64_t des_key_hi = 64'h133457799bbcdff1, des_key_lo = 64'h0e329232ea6d0d73;
  logic buf_empty, buf_full, key_ready, clk_slow, ce_slow, s2p_overrun, pack_overflow;
  logic [$clog2(BUF_DEPTH):0] buf_count;
  logic [15:0] pack_drops;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  iov_rx #(.BUF_DEPTH(BUF_DEPTH)) dut (.*);

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

  task automatic send_block(input block128_t b);
    for (int i = 127; i >= 0; i--) begin
      @(negedge clk);
      ser_in = b[i]; ser_valid = 1'b1;
    end
    @(negedge clk);
    ser_valid = 1'b0;
  endtask

  task automatic read_block(output block128_t b);
    while (buf_empty) @(negedge clk);
    b = buf_rd_data;
    buf_rd_en = 1'b1;
    @(negedge clk);
    buf_rd_en = 1'b0;
  endtask

  initial begin
    block128_t got, src [4], exp [4];
    int lat, full_seen = 0, stall_seen = 0;
    for (int i = 0; i < 4; i++) begin
      src[i] = ("rx" == "tx") ? PT[i] : CT[i];
      exp[i] = ("rx" == "tx") ? CT[i] : PT[i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); aes_key_load = 1'b1;
    @(negedge clk); aes_key_load = 1'b0;
    while (!key_ready) @(negedge clk);
    // One block alone: latency from its last serial bit to the buffer.
    send_block(src[0]);
    lat = 0;
    while (buf_empty) begin
      if (ce_slow) lat++;
      @(negedge clk);
    end
    $display("latency %0d slow cycles", lat);
    check(lat >= 28 && lat <= 32, $sformatf("latency %0d slow cycles", lat));
    read_block(got);
    check(got == exp[0], $sformatf("block 0: got %h exp %h", got, exp[0]));
    // Three blocks back to back.
    for (int i = 1; i < 4; i++) send_block(src[i]);
    for (int i = 1; i < 4; i++) begin
      read_block(got);
      check(got == exp[i], $sformatf("block %0d: got %h exp %h", i, got, exp[i]));
    end
    check(!s2p_overrun && pack_drops == 0, "no loss while the buffer is read");
    // Do not read: 4 in the buffer, 1 in the DES pair, 1 in AES, 1 held by the packer,
    // so blocks 8 and 9 of this burst must be dropped.
    fork
      for (int i = 0; i < 9; i++) send_block(src[i % 4]);
      forever begin
        @(negedge clk);
        if (buf_full) full_seen++;
        if (dut.u_buf.in_ready == 1'b0 && dut.aes_valid) stall_seen++;
      end
    join_any
    disable fork;
    repeat (200) @(negedge clk);
    check(full_seen > 0, "buffer became full");
    check(stall_seen > 0, "cipher stages stalled behind the full buffer");
    check(pack_drops == 2, $sformatf("packer dropped %0d blocks, expected 2", pack_drops));
    for (int i = 0; i < 7; i++) begin
      read_block(got);
      check(got == exp[i % 4], $sformatf("burst block %0d: got %h exp %h", i, got, exp[i % 4]));
    end
    repeat (400) @(negedge clk);
    check(buf_empty, "nothing more after the dropped blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
