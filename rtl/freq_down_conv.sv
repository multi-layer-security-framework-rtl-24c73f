// Frequency down conversion: derives the slow processing rate from the board clock.
//
// A modulo-DIV counter runs on the 50 MHz clock. It produces ce, a one-cycle pulse every DIV
// clocks, which every slow stage (packing, AES, DES, buffer write) uses as its clock enable,
// and clk_div, a square wave at clk/DIV (high for the first DIV/2 counts) that shows the
// slow rate on a pin or a logic analyser. DIV = 4 turns 50 MHz into 12.5 MHz as the design
// intends. Running the slow stages on the board clock with an enable, rather than on a
// divided clock, keeps the whole design in one clock domain; that is this design's choice.
// ce is high in the cycle where the counter is at DIV-1. Synchronous active-low reset.
module freq_down_conv #(
  parameter int unsigned DIV = 4   // >= 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic ce,
  output logic clk_div
);
  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else if (cnt == CW'(DIV - 1)) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end

  assign ce      = (cnt == CW'(DIV - 1));
  assign clk_div = (cnt < CW'(DIV / 2));

  initial assert (DIV >= 2) else $error("DIV must be at least 2");
endmodule
