// carrier_osc: digital carrier oscillator.
//
// Produces a square-wave carrier from the system clock: the output is high for
// HALF_CYCLES clocks, then low for HALF_CYCLES clocks, so its frequency is
// f_clk / (2 * HALF_CYCLES). With the default of 1 and an 80 MHz clock this is
// the 40 MHz carrier of the transmitter. period_tick is high on the last clock
// of every carrier period; registers that change on it (PN chip, data bit)
// therefore change exactly at the start of a carrier period, so BPSK phase
// reversals fall on a period boundary.
//
// Interface: clk, active-low synchronous reset rst_n, carrier (registered),
// period_tick (combinational from registers). After reset the carrier starts
// with its high half. The 40 MHz carrier follows the design description; the
// square-wave shape and clock-divider structure are this design's own choice.
module carrier_osc #(
  parameter int unsigned HALF_CYCLES = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic carrier,
  output logic period_tick
);

  localparam int unsigned CW = (HALF_CYCLES > 1) ? $clog2(HALF_CYCLES) : 1;

  logic [CW-1:0] count;
  logic          half_end;

  assign half_end    = (count == CW'(HALF_CYCLES - 1));
  assign period_tick = half_end && !carrier;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count   <= '0;
      carrier <= 1'b1;
    end else if (half_end) begin
      count   <= '0;
      carrier <= !carrier;
    end else begin
      count   <= count + 1'b1;
    end
  end

  initial assert (HALF_CYCLES >= 1) else $error("carrier_osc: HALF_CYCLES must be at least 1");

endmodule
