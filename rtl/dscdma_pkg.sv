// dscdma_pkg: rates and frame constants shared by the DS-CDMA transmitter.
//
// The transmitter runs from one system clock. Every slower rate (carrier
// period, chip, data bit) is a single-cycle clock-enable ("tick") derived from
// it, so the whole design is one clock domain.
//
// Rates that follow the design description: a 40 MHz carrier, a line rate of
// 2 Mbit/s, and frames of 16 serial data bits followed by one parity bit.
// Own choices: an 80 MHz system clock (two samples per carrier period, under
// the 100 MHz limit of the target board), two carrier periods per chip
// (20 Mchip/s) and ten chips per data bit, and a 7-stage PN register with the
// primitive polynomial x^7 + x^6 + 1.
package dscdma_pkg;

  // System clock and derived rates (Hz).
  localparam int unsigned CLK_HZ     = 80_000_000;
  localparam int unsigned CARRIER_HZ = 40_000_000;
  // Resulting line rate: CLK_HZ / (2 * CARRIER_HALF_CYCLES * CARRIERS_PER_CHIP
  // * CHIPS_PER_BIT) = 2 Mbit/s.

  // Clock cycles in each half of a carrier period.
  localparam int unsigned CARRIER_HALF_CYCLES = CLK_HZ / (2 * CARRIER_HZ);
  // Carrier periods per PN chip (x2 divider) and chips per data bit (x10 divider).
  localparam int unsigned CARRIERS_PER_CHIP = 2;
  localparam int unsigned CHIPS_PER_BIT     = 10;

  // Frame: 16 data bits followed by one parity bit.
  localparam int unsigned FRAME_DATA_BITS = 16;

  // PN code generator: 7-stage Fibonacci LFSR, x^7 + x^6 + 1, all-ones seed.
  localparam int unsigned   PN_DEGREE = 7;
  localparam logic [6:0]    PN_TAPS   = 7'b110_0000;
  localparam logic [6:0]    PN_SEED   = 7'b111_1111;

endpackage
