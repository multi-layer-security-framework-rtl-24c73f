// AES S-box lookup (or its inverse), one byte in, one byte out, purely combinational.
//
// The 256-entry table is a constant computed in iov_pkg from the definition of the S-box, so
// this module is a 256 x 8 ROM. The same ROM content also feeds the DES S-boxes (des_sbox),
// which is how the design lets one table serve both ciphers. INVERSE selects the inverse
// S-box used by AES decryption. No clock, no latency.
module aes_sbox #(
  parameter bit INVERSE = 1'b0
) (
  input  iov_pkg::byte_t a,
  output iov_pkg::byte_t y
);
  import iov_pkg::*;

  always_comb y = INVERSE ? AES_INV_SBOX[a] : AES_SBOX[a];
endmodule
