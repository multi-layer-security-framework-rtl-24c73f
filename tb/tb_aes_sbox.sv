// Testbench for aes_sbox: compares all 256 entries of the forward and inverse ROMs with an
// S-box the testbench builds itself (multiplicative inverse found by exhaustive search, then
// the affine map), and checks a few published values.
module tb_aes_sbox;
  logic [7:0] a, y, yi;
  int checks = 0, failures = 0;

  aes_sbox #(.INVERSE(1'b0)) dut  (.a(a), .y(y));
  aes_sbox #(.INVERSE(1'b1)) duti (.a(a), .y(yi));

  function automatic logic [7:0] mul(input logic [7:0] x, input logic [7:0] z);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (z[i]) p ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] inv = 0, s;
    for (int c = 1; c < 256; c++) if (mul(x, 8'(c)) == 8'h01) inv = 8'(c);
    s = 8'h63;
    for (int k = 0; k < 5; k++) s ^= (inv << k) | (inv >> (8 - k));
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] tbl [256];
    for (int i = 0; i < 256; i++) tbl[i] = ref_sbox(8'(i));
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      check(y == tbl[i], $sformatf("sbox[%02h] = %02h exp %02h", i, y, tbl[i]));
      a = tbl[i];
      #1;
      check(yi == 8'(i), $sformatf("inv_sbox[%02h] = %02h exp %02h", tbl[i], yi, i));
    end
    a = 8'h00; #1; check(y == 8'h63, "S(00) = 63");
    a = 8'h53; #1; check(y == 8'hed, "S(53) = ed");
    a = 8'hff; #1; check(y == 8'h16, "S(ff) = 16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
