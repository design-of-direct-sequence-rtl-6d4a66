// freq_divider: divides a tick rate by an integer.
//
// Counts input ticks (tick_in) and raises tick_out together with every DIV-th
// one, so tick_out is a one-cycle clock-enable at 1/DIV of the input tick rate
// and always coincides with an input tick. Cascading dividers therefore gives
// aligned ticks: the data-bit tick is also a chip tick and a carrier tick.
// The transmitter uses two of them: carrier -> chip (divide by 2) and
// chip -> data bit (divide by 10), the two frequency dividers of the design.
//
// Interface: clk, active-low synchronous reset rst_n, tick_in, tick_out
// (combinational from the count register and tick_in). After reset the first
// tick_out comes with the DIV-th tick_in. Using clock enables instead of
// derived clocks is this design's own choice.
module freq_divider #(
  parameter int unsigned DIV = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick_in,
  output logic tick_out
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] count;
  logic          last;

  assign last     = (count == CW'(DIV - 1));
  assign tick_out = tick_in && last;

  always_ff @(posedge clk) begin
    if (!rst_n)         count <= '0;
    else if (tick_in)   count <= last ? '0 : count + 1'b1;
  end

  initial assert (DIV >= 1) else $error("freq_divider: DIV must be at least 1");

endmodule
