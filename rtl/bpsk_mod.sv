// bpsk_mod: direct-sequence spreader and BPSK modulator.
//
// The data bit is spread by XOR with the current PN chip; the spread chip
// then sets the carrier phase: chip value 0 sends the carrier as it is,
// chip value 1 sends it inverted (a 180 degree phase shift). For a
// square-wave carrier this is carrier ^ data ^ chip. The result is
// registered so the output is free of glitches; it lags the carrier input by
// one clock. While en is low the output is held at 0 (transmitter silent).
//
// Interface: clk, active-low synchronous reset rst_n, en, carrier, data_bit,
// chip; spread (combinational data ^ chip), tx_out (registered), and tx_sym,
// the same output as a signed baseband level: +1 or -1 while sending, 0 while
// silent. Spreading by the PN code and BPSK modulation follow the design
// description; the XOR form for a digital square-wave carrier, the output
// register and the level output are this design's own choices.
module bpsk_mod (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              carrier,
  input  logic              data_bit,
  input  logic              chip,
  output logic              spread,
  output logic              tx_out,
  output logic signed [1:0] tx_sym
);

  assign spread = data_bit ^ chip;

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      tx_out <= 1'b0;
      tx_sym <= 2'sd0;
    end else begin
      tx_out <= carrier ^ spread;
      tx_sym <= (carrier ^ spread) ? 2'sd1 : -2'sd1;
    end
  end

endmodule
