// One DES S-box: 6 bits in, 4 bits out, purely combinational.
//
// The 6-bit input b1..b6 (b1 = MSB) selects row {b1,b6} and column {b2..b5}, giving the
// entry index 16*row + column, as in FIPS 46-3. With SRC = SBOX_AES_DERIVED (the default)
// the 64 four-bit entries of table number BOX are one eighth of the AES S-box: entry i is
// the high nibble (i even) or low nibble (i odd) of AES S-box byte 32*BOX + i/2, looked up in
// an aes_sbox ROM. So the eight DES S-boxes together use the AES table exactly once. With
// SRC = SBOX_DES_STANDARD the standard DES table BOX is used instead; that setting exists so
// that the DES datapath can be checked against published DES test vectors.
module des_sbox #(
  parameter iov_pkg::des_sbox_src_e SRC = iov_pkg::SBOX_AES_DERIVED,
  parameter int unsigned            BOX = 0   // 0..7
) (
  input  logic [5:0] b,
  output logic [3:0] y
);
  import iov_pkg::*;

  logic [5:0] idx;
  assign idx = {b[5], b[0], b[4:1]};

  if (SRC == SBOX_AES_DERIVED) begin : g_aes
    byte_t rom_addr, rom_data;
    assign rom_addr = {3'(BOX), idx[5:1]};
    aes_sbox #(.INVERSE(1'b0)) u_rom (.a(rom_addr), .y(rom_data));
    assign y = idx[0] ? rom_data[3:0] : rom_data[7:4];
  end else begin : g_std
    assign y = DES_SBOX_STD[BOX][idx];
  end
endmodule
