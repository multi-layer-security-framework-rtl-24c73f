// AES-128 decryption (inverse cipher), the second stage of the receive chain.
//
// Iterative: one round per slow-rate cycle, mirroring aes_encrypt. A block is accepted on a
// clock where ce, in_valid and in_ready are high; the state register then holds
// ciphertext ^ round key 10. Each following ce cycle applies InvShiftRows, InvSubBytes
// (16 inverse aes_sbox ROMs), AddRoundKey with round keys 9 down to 0 and InvMixColumns
// (left out in the last round). out_valid rises on the tenth ce cycle after the accept and
// holds the plaintext until taken. in_ready needs the key schedule ready and an empty core.
// The round keys come from aes_key_expand. The one-round-per-cycle structure is this
// design's choice; the inverse cipher is the standard one. Synchronous active-low reset.
module aes_decrypt (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ce,
  input  iov_pkg::aes_round_keys_t rk,
  input  logic                     key_ready,
  input  iov_pkg::block128_t       in_data,
  input  logic                     in_valid,
  output logic                     in_ready,
  output iov_pkg::block128_t       out_data,
  output logic                     out_valid,
  input  logic                     out_ready
);
  import iov_pkg::*;

  block128_t st, isr, isb, ark, nxt;
  logic [3:0] round;
  logic       busy;

  assign isr = aes_inv_shift_rows(st);
  for (genvar i = 0; i < 16; i++) begin : g_sb
    aes_sbox #(.INVERSE(1'b1)) u_sb (.a(isr[8*i +: 8]), .y(isb[8*i +: 8]));
  end

  always_comb begin
    ark = isb ^ rk[round];
    nxt = (round == 4'd0) ? ark : aes_inv_mix_columns(ark);
  end

  assign in_ready = key_ready && !busy && !out_valid;
  assign out_data = st;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= '0;
      round     <= '0;
      busy      <= 1'b0;
      out_valid <= 1'b0;
    end else if (ce) begin
      if (in_valid && in_ready) begin
        st    <= in_data ^ rk[10];
        round <= 4'd9;
        busy  <= 1'b1;
      end else if (busy) begin
        st <= nxt;
        if (round == 4'd0) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end else begin
          round <= round - 1'b1;
        end
      end else if (out_valid && out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
