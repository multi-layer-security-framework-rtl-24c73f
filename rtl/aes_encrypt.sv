// AES-128 encryption, the first stage of the transmit chain.
//
// Iterative: one round per slow-rate cycle. A block is accepted on a clock where ce,
// in_valid and in_ready are high; the state register then holds plaintext ^ round key 0.
// Each following ce cycle applies SubBytes (16 aes_sbox ROMs), ShiftRows, MixColumns (left
// out in round 10) and AddRoundKey. out_valid rises on the tenth ce cycle after the accept
// and holds the ciphertext until taken (ce, out_valid, out_ready high). in_ready is high
// only when the key schedule is ready and the core holds no block, so one block is in the
// core at a time: 10 ce cycles per block plus the hand-over. The round keys come from
// aes_key_expand. The one-round-per-cycle structure is this design's choice.
// Synchronous active-low reset.
module aes_encrypt (
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

  block128_t st, sb, sr, nxt;
  logic [3:0] round;
  logic       busy;

  for (genvar i = 0; i < 16; i++) begin : g_sb
    aes_sbox #(.INVERSE(1'b0)) u_sb (.a(st[8*i +: 8]), .y(sb[8*i +: 8]));
  end

  always_comb begin
    sr  = aes_shift_rows(sb);
    nxt = ((round == 4'd10) ? sr : aes_mix_columns(sr)) ^ rk[round];
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
        st    <= in_data ^ rk[0];
        round <= 4'd1;
        busy  <= 1'b1;
      end else if (busy) begin
        st <= nxt;
        if (round == 4'd10) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end else begin
          round <= round + 1'b1;
        end
      end else if (out_valid && out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
