// dscdma_tx: direct-sequence CDMA transmitter (digital part).
//
// Serial data is cut into frames of FRAME_DATA_BITS bits, each followed by
// one parity bit for error detection. Every bit on the air is spread by
// CHIPS_PER_BIT chips of a pseudo-noise code and the spread chip stream
// BPSK-modulates a square-wave carrier. With the defaults and an 80 MHz clock
// the carrier is 40 MHz, the chip rate 20 Mchip/s and the line rate 2 Mbit/s
// (40 clocks per bit, 680 clocks per 17-bit frame).
//
// Structure:
//   carrier_osc   carrier and carrier-period tick
//   freq_divider  carrier tick / CARRIERS_PER_CHIP -> chip tick
//   freq_divider  chip tick / CHIPS_PER_BIT        -> data-bit tick
//   tx_control    framing: 16 data bits + parity, data request to the source
//   parity_gen    running parity of the data bits of the frame
//   pn_generator  PN chip, advanced on every chip tick while sending
//   bpsk_mod      spreading (data ^ chip) and BPSK of the carrier
// All ticks coincide at period boundaries, so chip and bit changes fall at the
// start of a carrier period. The PN register is held at its seed while the
// transmitter is idle, so every transmission starts at the same code phase;
// back-to-back frames continue the code without restarting it.
//
// Interface: clk, active-low synchronous reset rst_n; tx_en starts frames at
// the next bit tick and, when dropped, stops after the current frame; data_in
// is sampled in the cycles where data_req is high. tx_out is the modulated
// carrier (one clock behind carrier), tx_sym the same as a +1/-1/0 level.
// The remaining outputs expose the internal timing for observation.
// The block list, the 40 MHz carrier, 2 Mbit/s and the 16+1 bit frame follow
// the design description; the clock plan, spreading factor and PN code are
// this design's own choices (see dscdma_pkg).
module dscdma_tx
  import dscdma_pkg::*;
#(
  parameter int unsigned HALF_CYCLES = CARRIER_HALF_CYCLES,
  parameter int unsigned CARRIER_DIV = CARRIERS_PER_CHIP,
  parameter int unsigned CHIP_DIV    = CHIPS_PER_BIT,
  parameter int unsigned DATA_BITS   = FRAME_DATA_BITS,
  parameter int unsigned PN_DEG      = PN_DEGREE,
  parameter logic [PN_DEG-1:0] PN_POLY = PN_TAPS,
  parameter logic [PN_DEG-1:0] PN_INIT = PN_SEED,
  parameter bit          ODD_PARITY  = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tx_en,
  input  logic              data_in,
  output logic              data_req,
  output logic              tx_out,
  output logic signed [1:0] tx_sym,
  output logic              carrier,
  output logic              chip,
  output logic              spread,
  output logic [PN_DEG-1:0] pn_state,
  output logic              tx_bit,
  output logic              active,
  output logic              frame_start,
  output logic              in_parity,
  output logic [$clog2(DATA_BITS+1)-1:0] bit_index,
  output logic              chip_tick,
  output logic              bit_tick
);

  logic period_tick;
  logic par_clear;
  logic parity;

  carrier_osc #(.HALF_CYCLES(HALF_CYCLES)) u_osc (
    .clk, .rst_n, .carrier, .period_tick
  );

  freq_divider #(.DIV(CARRIER_DIV)) u_chip_div (
    .clk, .rst_n, .tick_in(period_tick), .tick_out(chip_tick)
  );

  freq_divider #(.DIV(CHIP_DIV)) u_bit_div (
    .clk, .rst_n, .tick_in(chip_tick), .tick_out(bit_tick)
  );

  tx_control #(.DATA_BITS(DATA_BITS)) u_ctrl (
    .clk, .rst_n, .tx_en, .bit_tick, .data_in,
    .parity_in(parity), .data_req, .par_clear, .frame_start,
    .tx_bit, .active, .in_parity, .bit_index
  );

  parity_gen #(.ODD(ODD_PARITY)) u_parity (
    .clk, .rst_n, .clear(par_clear), .bit_valid(data_req), .bit_in(data_in),
    .parity
  );

  pn_generator #(.DEGREE(PN_DEG), .TAPS(PN_POLY), .SEED(PN_INIT)) u_pn (
    .clk, .rst_n, .load(!active), .step(chip_tick), .chip, .state(pn_state)
  );

  bpsk_mod u_bpsk (
    .clk, .rst_n, .en(active), .carrier, .data_bit(tx_bit), .chip,
    .spread, .tx_out, .tx_sym
  );

endmodule
