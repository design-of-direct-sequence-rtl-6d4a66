// tx_control: framing and timing controller of the transmitter.
//
// Builds the transmitted bit stream out of frames of DATA_BITS serial data
// bits followed by one parity bit, one bit per data-bit tick (bit_tick).
// While tx_en is high frames follow each other without a gap. At every
// bit_tick the controller decides what goes on the air for the next bit
// period:
//   * idle, or the parity bit of a frame has just been sent: if tx_en is high
//     a new frame starts with data bit 0 (frame_start), otherwise it goes idle;
//   * data bit DATA_BITS-1 has just been sent: the parity bit follows;
//   * otherwise the next data bit follows.
// A data bit is taken from data_in in the cycle in which data_req is high
// (data_req = bit_tick while a data bit is being loaded); the source must hold
// the bit there and may change it afterwards. The same strobe feeds the parity
// generator (par_clear restarts it with bit 0). A frame that has started is
// always finished, even if tx_en falls in the middle of it.
//
// Outputs tx_bit, active, bit_index and in_parity are registered and change
// only right after a bit_tick. While idle tx_bit is 0 and active is 0.
// Framing 16 data bits with one parity bit follows the design description;
// the data-request handshake, back-to-back frames and finishing a frame on
// tx_en low are this design's own choices.
module tx_control #(
  parameter int unsigned DATA_BITS = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tx_en,      // keep sending frames
  input  logic bit_tick,   // data-bit rate clock-enable
  input  logic data_in,    // serial data, sampled when data_req is high
  input  logic parity_in,  // parity of the data bits sent so far in the frame
  output logic data_req,   // data_in is consumed this cycle
  output logic par_clear,  // restart the parity generator (first data bit)
  output logic frame_start,// a frame starts this cycle
  output logic tx_bit,     // bit on the air (data or parity)
  output logic active,     // a frame is being sent
  output logic in_parity,  // tx_bit is the parity bit
  output logic [$clog2(DATA_BITS+1)-1:0] bit_index // position of tx_bit in its frame
);

  localparam int unsigned IW = $clog2(DATA_BITS + 1);

  typedef enum logic [1:0] {
    S_IDLE,
    S_DATA,
    S_PARITY
  } state_t;

  state_t state, state_next;
  logic   load_data, load_parity;
  logic   last_data;

  assign last_data = (bit_index == IW'(DATA_BITS - 1));

  always_comb begin
    state_next  = state;
    load_data   = 1'b0;
    load_parity = 1'b0;
    frame_start = 1'b0;
    if (bit_tick) begin
      unique case (state)
        S_IDLE, S_PARITY: begin
          if (tx_en) begin
            state_next  = S_DATA;
            load_data   = 1'b1;
            frame_start = 1'b1;
          end else begin
            state_next  = S_IDLE;
          end
        end
        S_DATA: begin
          if (last_data) begin
            state_next  = S_PARITY;
            load_parity = 1'b1;
          end else begin
            load_data   = 1'b1;
          end
        end
        default: state_next = S_IDLE;
      endcase
    end
  end

  assign data_req  = load_data;
  assign par_clear = frame_start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      tx_bit    <= 1'b0;
      bit_index <= '0;
    end else begin
      state <= state_next;
      if (frame_start) begin
        bit_index <= '0;
        tx_bit    <= data_in;
      end else if (load_data) begin
        bit_index <= bit_index + 1'b1;
        tx_bit    <= data_in;
      end else if (load_parity) begin
        bit_index <= bit_index + 1'b1;
        tx_bit    <= parity_in;
      end else if (bit_tick && state_next == S_IDLE) begin
        bit_index <= '0;
        tx_bit    <= 1'b0;
      end
    end
  end

  assign active    = (state != S_IDLE);
  assign in_parity = (state == S_PARITY);

  // Data is only requested on a bit tick, and never for the parity slot.
  assert property (@(posedge clk) disable iff (!rst_n) data_req |-> bit_tick);
  assert property (@(posedge clk) disable iff (!rst_n) load_parity |-> !data_req);
  assert property (@(posedge clk) disable iff (!rst_n) bit_index <= IW'(DATA_BITS));

endmodule
