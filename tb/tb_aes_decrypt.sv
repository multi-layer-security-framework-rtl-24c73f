// Testbench for aes_decrypt: runs the FIPS-197 Appendix B and C.1 vectors and three more blocks
// under the C.1 key (expected values from an independent software model of AES), checks
// that each result appears exactly 10 slow-rate cycles after the block is accepted, that
// blocks follow each other, and that a result is held while out_ready is low.
module tb_aes_decrypt;
  import iov_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ce, key_load = 1'b0, key_ready;
  block128_t key = '0, in_data = '0, out_data;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  aes_round_keys_t rk;
  logic [1:0] div = '0;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;
  always_ff @(posedge clk) div <= div + 1'b1;
  assign ce = (div == 2'd3);

  aes_key_expand u_kexp (.clk, .rst_n, .ce, .key_load, .key, .rk, .key_ready);
  aes_decrypt dut (.clk, .rst_n, .ce, .rk, .key_ready, .in_data, .in_valid, .in_ready,
                 .out_data, .out_valid, .out_ready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load_key(input block128_t k);
    @(negedge clk); key = k; key_load = 1'b1;
    @(negedge clk); key_load = 1'b0;
    while (!key_ready) @(negedge clk);
  endtask

  // Offer one block, wait for the hand-over, then count slow cycles until out_valid.
  task automatic run(input block128_t ct, input block128_t pt, input int hold);
    int n = 0;
    @(negedge clk);
    in_data = ct; in_valid = 1'b1;
    while (!(ce && in_ready)) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 1'b0;
    out_ready = (hold == 0);
    forever begin
      @(negedge clk);
      if (out_valid) break;
      if (ce) n++;
    end
    check(n == 10, $sformatf("latency %0d slow cycles, expected 10", n));
    check(out_data == pt, $sformatf("decryption of %h: got %h exp %h", ct, out_data, pt));
    if (hold != 0) begin
      repeat (4 * hold) @(posedge clk);
      #1 check(out_valid && out_data == pt && !in_ready, "result held while out_ready is low");
      out_ready = 1'b1;
    end
    while (!ce) @(negedge clk);
    @(negedge clk);
    check(!out_valid, "result taken");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    run(128'h3925841d02dc09fbdc118597196a0b32, 128'h3243f6a8885a308d313198a2e0370734, 0);
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff, 3);
    run(128'ha9541c06f1c21125e44013531e18f406, 128'h01102332455467768998abbacddceffe, 0);
    run(128'hecb43335dce496e839f75536304d1630, 128'h02132031465764758a9ba8b9cedfecfd, 0);
    run(128'h042735ab9246a07bdeb21dfeb6ad1192, 128'h03122130475665748b9aa9b8cfdeedfc, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
