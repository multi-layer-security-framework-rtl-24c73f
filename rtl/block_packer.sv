// Byte-to-block packer: collects 16 bytes into one 128-bit block.
//
// Works only on slow-rate cycles (ce high). A byte is taken whenever in_valid is high on such
// a cycle (in_ready is always high: a serial link cannot be stalled). The first byte of a
// block lands in bits [127:120], the AES byte-0 position. After the sixteenth byte the block
// is moved to the output register (out_valid), where it waits for out_ready. If the output
// register is still occupied when the next block is complete, that block is dropped and
// overflow pulses for one clock and is counted in drop_count; this is how back-pressure from
// the cipher stages ends at the serial input. All of this is this design's own choice: the
// block size follows from the 128-bit AES input. Synchronous active-low reset.
module block_packer (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  iov_pkg::byte_t    in_data,
  input  logic              in_valid,
  output logic              in_ready,
  output iov_pkg::block128_t out_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              overflow,
  output logic [15:0]       drop_count
);
  import iov_pkg::*;

  logic [119:0] acc;
  logic [3:0]   cnt;
  logic         take_in, take_out, last;

  assign in_ready = 1'b1;
  assign take_in  = ce && in_valid;
  assign take_out = ce && out_valid && out_ready;
  assign last     = take_in && (cnt == 4'd15);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc        <= '0;
      cnt        <= '0;
      out_data   <= '0;
      out_valid  <= 1'b0;
      overflow   <= 1'b0;
      drop_count <= '0;
    end else begin
      overflow <= 1'b0;
      if (take_in) begin
        acc <= {acc[111:0], in_data};
        cnt <= cnt + 1'b1;
      end
      if (last && (!out_valid || take_out)) begin
        out_data  <= {acc, in_data};
        out_valid <= 1'b1;
      end else begin
        if (last) begin
          overflow   <= 1'b1;
          drop_count <= drop_count + 1'b1;
        end
        if (take_out) out_valid <= 1'b0;
      end
    end
  end
endmodule
