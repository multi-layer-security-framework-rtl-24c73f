// DES on one 64-bit half block: encryption or, with DECRYPT = 1, decryption.
//
// Iterative: one Feistel round per slow-rate cycle, 16 in all. A block is accepted on a clock
// where ce, in_valid and in_ready are high; the initial permutation splits it into L and R and
// PC-1 loads the 56-bit key state C,D from key (a 64-bit key with parity bits, which are
// ignored). Each round builds the subkey from C,D on the fly (rotate left then PC-2 when
// encrypting; PC-2 then rotate right when decrypting, which yields the subkeys in reverse
// order) and computes R' = L ^ P(S(E(R) ^ K)), L' = R. out_valid rises on the 16th ce cycle
// after the accept; out_data is the final permutation of R16,L16 and holds until taken.
//
// The S-boxes are the design's shared-table variant: with SBOX_SRC = SBOX_AES_DERIVED, S-box
// slot j uses table SBOX_ORDER[j] carved out of the AES S-box (see des_sbox), so two
// instances with different SBOX_ORDER give two different ciphers from the same table. The
// result is therefore a DES-structured cipher, not standard DES, unless SBOX_SRC is
// SBOX_DES_STANDARD with SBOX_ORDER_FWD. Taking the S-boxes from the AES table with a
// different order per branch follows the design description; the table layout, the two
// orders and the iterative structure are this design's choices. Synchronous active-low reset.
module des_core #(
  parameter bit                     DECRYPT    = 1'b0,
  parameter iov_pkg::des_sbox_src_e SBOX_SRC   = iov_pkg::SBOX_AES_DERIVED,
  parameter iov_pkg::sbox_order_t   SBOX_ORDER = iov_pkg::SBOX_ORDER_FWD
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  iov_pkg::block64_t key,
  input  iov_pkg::block64_t in_data,
  input  logic              in_valid,
  output logic              in_ready,
  output iov_pkg::block64_t out_data,
  output logic              out_valid,
  input  logic              out_ready
);
  import iov_pkg::*;

  logic [31:0] l, r, f, s_out;
  logic [55:0] cd, cd_nxt;
  logic [47:0] subkey, x;
  logic [3:0]  round;
  logic        busy;

  always_comb begin
    if (DECRYPT) begin
      subkey = des_pc2(cd);
      cd_nxt = des_rotr(cd, DES_SHIFTS[4'd15 - round]);
    end else begin
      cd_nxt = des_rotl(cd, DES_SHIFTS[round]);
      subkey = des_pc2(cd_nxt);
    end
    x = des_e(r) ^ subkey;
  end

  for (genvar j = 0; j < 8; j++) begin : g_sbox
    des_sbox #(.SRC(SBOX_SRC), .BOX(int'(SBOX_ORDER[j]))) u_sbox (
      .b(x[47 - 6*j -: 6]), .y(s_out[31 - 4*j -: 4]));
  end

  assign f        = des_p(s_out);
  assign in_ready = !busy && !out_valid;
  assign out_data = des_fp({r, l});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      l         <= '0;
      r         <= '0;
      cd        <= '0;
      round     <= '0;
      busy      <= 1'b0;
      out_valid <= 1'b0;
    end else if (ce) begin
      if (in_valid && in_ready) begin
        {l, r} <= des_ip(in_data);
        cd     <= des_pc1(key);
        round  <= '0;
        busy   <= 1'b1;
      end else if (busy) begin
        l     <= r;
        r     <= l ^ f;
        cd    <= cd_nxt;
        round <= round + 1'b1;
        if (round == 4'd15) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end
      end else if (out_valid && out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
