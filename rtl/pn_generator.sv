// pn_generator: pseudo-noise (PN) spreading-code generator.
//
// A Fibonacci linear feedback shift register of DEGREE stages. On each step
// the register shifts towards its top bit and the new bottom bit is the XOR
// of the stages selected by TAPS; the chip is the top stage. With the default
// taps (x^7 + x^6 + 1, a primitive polynomial) the chip sequence c[n] obeys
// c[n+7] = c[n] ^ c[n+1] and repeats every 2^7 - 1 = 127 chips.
// The seed selects the code phase; transmitters given different seeds send
// different codes.
//
// Interface: clk, active-low synchronous reset rst_n; load (reloads SEED,
// takes priority); step (advance one chip, normally the chip tick); chip is
// the current chip and state the whole register. The first chip after a load
// is SEED[DEGREE-1]. The existence of a PN code generator follows the design
// description; its length, polynomial and seed are this design's own choice.
module pn_generator #(
  parameter int unsigned          DEGREE = 7,
  parameter logic [DEGREE-1:0]    TAPS   = 7'b110_0000,
  parameter logic [DEGREE-1:0]    SEED   = '1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              step,
  output logic              chip,
  output logic [DEGREE-1:0] state
);

  logic feedback;

  assign feedback = ^(state & TAPS);
  assign chip     = state[DEGREE-1];

  always_ff @(posedge clk) begin
    if (!rst_n || load) state <= SEED;
    else if (step)      state <= {state[DEGREE-2:0], feedback};
  end

  initial assert (DEGREE >= 2 && SEED != '0)
    else $error("pn_generator: need DEGREE >= 2 and a non-zero SEED");

  // An LFSR of this kind must never reach the all-zero lock-up state.
  assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
