// AES-128 key schedule: expands the 128-bit cipher key into the 11 round keys.
//
// key_load (any clock) captures key as round key 0 and starts the expansion; after that one
// round key is produced per slow-rate cycle (ce high), ten in all, using four aes_sbox ROMs for
// SubWord(RotWord(w)) and the round constant sequence 01, 02, 04, .. 1b, 36. key_ready rises
// with the tenth and stays high until the next key_load. The round keys are held in registers
// so that both cipher directions can use them in any order. The iterative, stored schedule is
// this design's choice; the key schedule itself is the standard one. Synchronous active-low
// reset clears key_ready.
module aes_key_expand (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ce,
  input  logic                     key_load,
  input  iov_pkg::block128_t       key,
  output iov_pkg::aes_round_keys_t rk,
  output logic                     key_ready
);
  import iov_pkg::*;

  block128_t cur, nxt;
  byte_t     rcon;
  logic [3:0] idx;       // index of the round key produced next
  logic      busy;
  logic [31:0] rot, sub, w0, w1, w2, w3;

  assign rot = {cur[23:0], cur[31:24]};
  for (genvar i = 0; i < 4; i++) begin : g_sub
    aes_sbox #(.INVERSE(1'b0)) u_sb (.a(rot[8*i +: 8]), .y(sub[8*i +: 8]));
  end

  always_comb begin
    w0  = cur[127:96] ^ sub ^ {rcon, 24'h0};
    w1  = cur[95:64] ^ w0;
    w2  = cur[63:32] ^ w1;
    w3  = cur[31:0] ^ w2;
    nxt = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      key_ready <= 1'b0;
      idx       <= '0;
      rcon      <= 8'h01;
      cur       <= '0;
      rk        <= '0;
    end else if (key_load) begin
      rk[0]     <= key;
      cur       <= key;
      idx       <= 4'd1;
      rcon      <= 8'h01;
      busy      <= 1'b1;
      key_ready <= 1'b0;
    end else if (ce && busy) begin
      rk[idx] <= nxt;
      cur     <= nxt;
      rcon    <= gf_xtime(rcon);
      idx     <= idx + 1'b1;
      if (idx == 4'd10) begin
        busy      <= 1'b0;
        key_ready <= 1'b1;
      end
    end
  end
endmodule
