// Result buffer: a FIFO of DEPTH 128-bit blocks holding the cipher (or recovered plain) text.
//
// The write side belongs to the slow stages: a block is written on a clock where ce, in_valid
// and in_ready are high, and in_ready is low while the FIFO is full, which stalls the cipher
// stages in front of it. The read side runs at the board clock: rd_data always shows the
// oldest block (first-word fall-through) and rd_en, while empty is low, removes it. count
// gives the fill level. The buffer itself is what the design names; its depth, width and
// read interface are this design's choices. Synchronous active-low reset empties it.
module block_buffer #(
  parameter int unsigned DEPTH = 16,    // power of two
  parameter int unsigned W     = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ce,
  input  logic [W-1:0]               in_data,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH):0]     count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          wr, rd;

  assign full     = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign empty    = (wptr == rptr);
  assign in_ready = !full;
  assign wr       = ce && in_valid && !full;
  assign rd       = rd_en && !empty;
  assign count    = wptr - rptr;
  assign rd_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr) mem[wptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr) wptr <= wptr + 1'b1;
      if (rd) rptr <= rptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0) else $error("DEPTH must be a power of two");

  a_no_read_when_empty: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("block_buffer: read while empty");
endmodule
