// Testbench for des_core. Six instances run side by side on the same vectors: standard DES
// encryption and decryption (FIPS 46-3 S-boxes, checked against published DES test vectors)
// and the AES-derived S-box variant in both slot orders, encrypting and decrypting (expected
// values from an independent software model of the shared-table rule). It checks each result,
// that results appear exactly 16 slow-rate cycles after a block is accepted, and that a result
// is held while out_ready is low.
module tb_des_core;
  import iov_pkg::*;
  localparam int N = 6;
  logic clk = 1'b0, rst_n = 1'b0, ce;
  block64_t key = '0;
  block64_t in_data [N], out_data [N];
  logic in_valid = 1'b0, out_ready = 1'b1;
  logic [N-1:0] in_ready, out_valid;
  logic [1:0] div = '0;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;
  always_ff @(posedge clk) div <= div + 1'b1;
  assign ce = (div == 2'd3);

  localparam bit         DEC [N] = '{1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1};
  localparam des_sbox_src_e SRC [N] = '{SBOX_DES_STANDARD, SBOX_DES_STANDARD, SBOX_AES_DERIVED,
                                        SBOX_AES_DERIVED, SBOX_AES_DERIVED, SBOX_AES_DERIVED};
  localparam sbox_order_t ORD [N] = '{SBOX_ORDER_FWD, SBOX_ORDER_FWD, SBOX_ORDER_FWD,
                                      SBOX_ORDER_REV, SBOX_ORDER_FWD, SBOX_ORDER_REV};

  for (genvar i = 0; i < N; i++) begin : g
    des_core #(.DECRYPT(DEC[i]), .SBOX_SRC(SRC[i]), .SBOX_ORDER(ORD[i])) dut (
      .clk, .rst_n, .ce, .key, .in_data(in_data[i]), .in_valid, .in_ready(in_ready[i]),
      .out_data(out_data[i]), .out_valid(out_valid[i]), .out_ready);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int hold = 0;

  task automatic vec(input block64_t k, input block64_t pt, input block64_t ct_std,
                     input block64_t ct_fwd, input block64_t ct_rev);
    block64_t exp [N];
    int n = 0;
    @(negedge clk);
    key = k;
    in_data = '{pt, ct_std, pt, pt, ct_fwd, ct_rev};
    exp     = '{ct_std, pt, ct_fwd, ct_rev, pt, pt};
    in_valid = 1'b1;
    while (!(ce && in_ready == '1)) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 1'b0;
    out_ready = (hold == 0);
    forever begin
      @(negedge clk);
      if (out_valid[0]) break;
      if (ce) n++;
    end
    check(n == 16, $sformatf("latency %0d slow cycles, expected 16", n));
    check(out_valid == '1, "all instances finish together");
    for (int i = 0; i < N; i++)
      check(out_data[i] == exp[i], $sformatf("instance %0d key %h in %h: got %h exp %h",
                                             i, k, in_data[i], out_data[i], exp[i]));
    if (hold != 0) begin
      repeat (4 * hold) @(negedge clk);
      check(out_valid == '1 && in_ready == '0, "results held while out_ready is low");
      for (int i = 0; i < N; i++) check(out_data[i] == exp[i], "held result unchanged");
      out_ready = 1'b1;
    end
    while (!ce) @(negedge clk);
    @(negedge clk);
    check(out_valid == '0, "results taken");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    vec(64'h133457799bbcdff1, 64'h0123456789abcdef, 64'h85e813540f0ab405, 64'hbe2bb6e270b812d3, 64'hae694776df1a53e2);
    vec(64'h0e329232ea6d0d73, 64'h8787878787878787, 64'h0000000000000000, 64'h34134fe11958b29a, 64'h7918d56eb05dd26d);
    hold = 3;
    vec(64'h0123456789abcdef, 64'h4e6f772069732074, 64'h3fa40e8a984d4815, 64'h416e8fbe7ab304ce, 64'h79a8f2a28c5218af);
    hold = 0;
    vec(64'h0e329232ea6d0d73, 64'hfedcba9876543210, 64'hea825383039557e1, 64'hc15f591561cc67ee, 64'h3c7ded1958d65d26);
    vec(64'h6513270e269e0d37, 64'hf2a74de452e6b438, 64'h9ebd8804697fdd89, 64'h1d16b706c8ababc6, 64'h7a9f3c7638c0d9c1);
    vec(64'hd23f0824128b2f33, 64'h0c5c7fd0a6a3a450, 64'h66895bd3176a8891, 64'h2dac4777c38a1af8, 64'h6c1f7b7c4d328443);
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
