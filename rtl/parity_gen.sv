// parity_gen: serial parity generator for the frame check bit.
//
// Accumulates the XOR of the data bits of a frame as they are sent, one bit
// per cycle in which bit_valid is high. clear starts a new frame; when clear
// and bit_valid come together the accumulator restarts with that bit. parity
// is the accumulated value, inverted when ODD is set, so after the 16 data
// bits it is the bit that makes the 17-bit frame even (or odd) in ones.
//
// Interface: clk, active-low synchronous reset rst_n, clear, bit_valid,
// bit_in, parity (registered, valid the cycle after the last bit). One parity
// bit per 16-bit frame follows the design description; even parity as the
// default is this design's own choice.
module parity_gen #(
  parameter bit ODD = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic bit_valid,
  input  logic bit_in,
  output logic parity
);

  logic acc;

  always_ff @(posedge clk) begin
    if (!rst_n)         acc <= 1'b0;
    else if (clear)     acc <= bit_valid & bit_in;
    else if (bit_valid) acc <= acc ^ bit_in;
  end

  assign parity = acc ^ ODD;

endmodule
