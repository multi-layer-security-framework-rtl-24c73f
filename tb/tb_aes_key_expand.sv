// Testbench for aes_key_expand: expands the FIPS-197 Appendix A.1 key and the Appendix C.1
// key, checks published round keys, and checks that key_ready rises on the tenth slow-rate
// cycle after key_load.
module tb_aes_key_expand;
  import iov_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ce, key_load = 1'b0, key_ready;
  block128_t key = '0;
  aes_round_keys_t rk;
  logic [1:0] div = '0;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;
  always_ff @(posedge clk) div <= div + 1'b1;
  assign ce = (div == 2'd3);

  aes_key_expand dut (.clk, .rst_n, .ce, .key_load, .key, .rk, .key_ready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expand(input block128_t k, output int ce_cycles);
    @(negedge clk);
    key = k; key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    check(!key_ready, "key_ready drops on key_load");
    ce_cycles = 0;
    forever begin
      if (key_ready) break;
      if (ce) ce_cycles++;
      @(negedge clk);
    end
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c, n);
    check(n == 10, $sformatf("expansion took %0d slow cycles", n));
    check(rk[0]  == 128'h2b7e151628aed2a6abf7158809cf4f3c, "A.1 rk0");
    check(rk[1]  == 128'ha0fafe1788542cb123a339392a6c7605, "A.1 rk1");
    check(rk[2]  == 128'hf2c295f27a96b9435935807a7359f67f, "A.1 rk2");
    check(rk[10] == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "A.1 rk10");
    expand(128'h000102030405060708090a0b0c0d0e0f, n);
    check(n == 10, $sformatf("expansion took %0d slow cycles", n));
    check(rk[10] == 128'h13111d7fe3944a17f307a78b4d2b30c5, "C.1 rk10");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
