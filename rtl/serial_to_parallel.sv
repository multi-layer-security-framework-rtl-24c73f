// Serial-to-parallel converter: bits at the board clock in, bytes at the slow rate out.
//
// Each clock with ser_valid high shifts ser_in into an 8-bit register, first bit ending up as
// the MSB. When the eighth bit arrives the byte is copied to the output register and
// out_valid rises. The slow side takes the byte on a clock where ce, out_valid and out_ready
// are all high (the handshake rule used between all slow stages). If a new byte is complete
// while the previous one has not been taken, the new byte is dropped and the sticky overrun
// flag is set; at DIV = 4 and one bit per clock that cannot happen, since a byte lasts eight
// clocks and the slow side looks every four. Bit order and the overrun rule are this
// design's choices. Synchronous active-low reset.
module serial_to_parallel (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ce,
  input  logic           ser_in,
  input  logic           ser_valid,
  output iov_pkg::byte_t out_data,
  output logic           out_valid,
  input  logic           out_ready,
  output logic           overrun
);
  logic [6:0] shreg;
  logic [2:0] bitcnt;
  logic       take, byte_done;

  assign take      = ce && out_valid && out_ready;
  assign byte_done = ser_valid && (bitcnt == 3'd7);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg     <= '0;
      bitcnt    <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      if (ser_valid) begin
        shreg  <= {shreg[5:0], ser_in};
        bitcnt <= bitcnt + 1'b1;
      end
      if (byte_done && (!out_valid || take)) begin
        out_data  <= {shreg, ser_in};
        out_valid <= 1'b1;
      end else begin
        if (byte_done) overrun <= 1'b1;
        if (take) out_valid <= 1'b0;
      end
    end
  end
endmodule
