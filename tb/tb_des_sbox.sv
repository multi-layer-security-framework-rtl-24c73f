// Testbench for des_sbox. For all eight AES-derived boxes it compares every entry with the
// nibble the shared-table rule picks out of a published AES S-box excerpt (first bytes of each
// 32-byte slice) and, for every entry, with the testbench's own AES S-box. For the standard
// boxes it checks the FIPS 46-3 example S1(011011) = 0101 and that every row is a permutation
// of 0..15.
module tb_des_sbox;
  logic [5:0] b;
  logic [3:0] ya [8], ys [8];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 8; k++) begin : g
    des_sbox #(.SRC(iov_pkg::SBOX_AES_DERIVED),  .BOX(k)) ua (.b(b), .y(ya[k]));
    des_sbox #(.SRC(iov_pkg::SBOX_DES_STANDARD), .BOX(k)) us (.b(b), .y(ys[k]));
  end

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

  // AES S-box bytes 0x00, 0x20, 0x40, .. 0xe0 (FIPS-197 Figure 7).
  localparam logic [7:0] SLICE0 [8] = '{8'h63, 8'hb7, 8'h09, 8'hd0, 8'hcd, 8'he0, 8'hba, 8'he1};

  initial begin
    for (int k = 0; k < 8; k++) begin
      // Entry 0 (row 0, column 0) and entry 1 (row 0, column 1).
      b = 6'b000000; #1;
      check(ya[k] == SLICE0[k][7:4], $sformatf("box %0d entry 0", k));
      b = 6'b000010; #1;
      check(ya[k] == SLICE0[k][3:0], $sformatf("box %0d entry 1", k));
      for (int i = 0; i < 64; i++) begin
        logic [5:0] idx;
        logic [7:0] v;
        b = 6'(i); #1;
        idx = {b[5], b[0], b[4:1]};
        v = ref_sbox({3'(k), idx[5:1]});
        check(ya[k] == (idx[0] ? v[3:0] : v[7:4]), $sformatf("box %0d input %0d", k, i));
      end
      for (int row = 0; row < 4; row++) begin
        logic [15:0] seen = '0;
        for (int col = 0; col < 16; col++) begin
          b = {row[1], 4'(col), row[0]}; #1;
          seen[ys[k]] = 1'b1;
        end
        check(seen == 16'hffff, $sformatf("standard box %0d row %0d not a permutation", k, row));
      end
    end
    b = 6'b011011; #1;
    check(ys[0] == 4'b0101, "S1(011011) = 0101");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
