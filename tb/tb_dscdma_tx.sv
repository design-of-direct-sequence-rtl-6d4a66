// tb_dscdma_tx: end-to-end test of the DS-CDMA transmitter at its default
// parameters (80 MHz clock, 40 MHz carrier, 20 Mchip/s, 2 Mbit/s, 16 data
// bits + 1 parity bit per frame, 7-stage PN code).
//
// The reference is written from the rates alone: with t counted in clocks
// from the release of reset, the carrier is high when t is even, a chip tick
// falls on t mod 4 = 3 and a bit tick on t mod 40 = 39. The PN reference is
// the recurrence c[n+7] = c[n] ^ c[n+1] from seven ones. A frame model
// decides at every bit tick what goes on the air. Each clock the testbench
// checks the carrier, the ticks, data_req, the bit and chip on the air and
// the modulated output (carrier, inverted when bit ^ chip = 1, one clock
// later). A model receiver then despreads tx_out with the reference carrier
// and code, votes over each bit period, and checks every frame: 16 data bits
// equal to those supplied and even parity over all 17.
//
// Scenario: tx_en high for three frames and five bits of a fourth; tx_en
// low, so the fourth frame finishes and the transmitter idles; tx_en high
// again for two more frames. Each mechanism (frame start, back-to-back frame,
// parity 0 and 1, phase reversal, PN period wrap, finish after tx_en drop,
// idle, restart from idle with the code reloaded) must occur at least once.
module tb_dscdma_tx;
  localparam int CLK_PER_CHIP = 4;
  localparam int CLK_PER_BIT  = 40;
  localparam int MAX_BITS     = 400;

  logic              clk = 1'b0;
  logic              rst_n, tx_en, data_in;
  logic              data_req, tx_out, carrier, chip, spread, tx_bit, active;
  logic              frame_start, in_parity, chip_tick, bit_tick;
  logic signed [1:0] tx_sym;
  logic [6:0]        pn_state;
  logic [4:0]        bit_index;
  int                checks = 0, failures = 0;

  always #5 clk = ~clk;   // 10 time units = one 80 MHz clock period (12.5 ns)

  dscdma_tx dut (
    .clk, .rst_n, .tx_en, .data_in, .data_req, .tx_out, .tx_sym, .carrier,
    .chip, .spread, .pn_state, .tx_bit, .active, .frame_start, .in_parity,
    .bit_index, .chip_tick, .bit_tick
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference PN sequence
  bit pn_ref[1024];
  // supplied data bits
  bit src[MAX_BITS];
  // per bit on the air (global index g): expected value, frame, slot, votes
  bit air_bit[MAX_BITS];
  int air_frame[MAX_BITS], air_slot[MAX_BITS], votes[MAX_BITS], nsamp[MAX_BITS];

  initial begin
    // model state
    bit m_active, m_par, m_bit;
    int m_slot, m_idx, g, n_air, src_ptr, frame_no;
    bit exp_start, exp_req, chip_t, bit_t, exp_out_prev, dropped;
    bit pend_valid, pend_ref; int pend_g;
    int prev_req_t, t_frame0;
    int n_frames, n_back_to_back, n_restart, n_par1, n_par0, n_reversal;
    int n_wrap, n_finish_drop, n_idle_ticks, tick_k, prev_out;
    bit seen_first;

    for (int i = 0; i < 7; i++) pn_ref[i] = 1'b1;
    for (int i = 7; i < 1024; i++) pn_ref[i] = pn_ref[i-7] ^ pn_ref[i-6];
    for (int i = 0; i < MAX_BITS; i++) begin
      src[i] = 1'($urandom); votes[i] = 0; nsamp[i] = 0;
    end
    // make the first frame's parity 1 and the second's 0
    for (int i = 0; i < 16; i++) src[i] = (i == 3);
    for (int i = 16; i < 32; i++) src[i] = (i == 20 || i == 21);

    m_active = 0; m_par = 0; m_bit = 0; m_slot = 0; m_idx = 0;
    g = -1; n_air = 0; src_ptr = 0; frame_no = -1; dropped = 0;
    exp_out_prev = 0; pend_valid = 0; pend_ref = 0; pend_g = 0;
    prev_req_t = -1; t_frame0 = -1; seen_first = 0; prev_out = -1;
    n_frames = 0; n_back_to_back = 0; n_restart = 0; n_par1 = 0; n_par0 = 0;
    n_reversal = 0; n_wrap = 0; n_finish_drop = 0; n_idle_ticks = 0; tick_k = 0;

    rst_n = 1'b0; tx_en = 1'b0; data_in = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int t = 0; t < 160 * CLK_PER_BIT; t++) begin
      // stimulus, by bit-tick number: on for 3 frames + 5 bits, then off
      // for 20 bit periods after that frame, then on for 2 more frames
      tx_en   = (tick_k < 3 * 17 + 5) || (tick_k >= 4 * 17 + 20 && tick_k < 4 * 17 + 20 + 2 * 17);
      if (tick_k == 3 * 17 + 5) dropped = 1;
      data_in = src[src_ptr];
      chip_t  = (t % CLK_PER_CHIP) == CLK_PER_CHIP - 1;
      bit_t   = (t % CLK_PER_BIT) == CLK_PER_BIT - 1;
      #1;
      // ---- checks of the registered state in cycle t
      check(carrier == ((t % 2) == 0), "carrier 40 MHz square wave");
      check(chip_tick == chip_t, "chip tick every 4 clocks");
      check(bit_tick == bit_t, "bit tick every 40 clocks");
      check(active == m_active, "active");
      check(tx_bit == m_bit, "bit on the air");
      if (m_active) check(chip == pn_ref[m_idx], "PN chip");
      check(tx_out == exp_out_prev, "modulated output");
      check(tx_sym == (exp_out_prev ? 2'sd1 : (pend_valid ? -2'sd1 : 2'sd0)), "output level");
      check(in_parity == (m_active && m_slot == 16), "parity slot flag");
      // model receiver: the sample now on tx_out belongs to last cycle
      if (pend_valid) begin
        votes[pend_g] += (tx_out ^ pend_ref) ? 1 : 0;
        nsamp[pend_g]++;
        if (prev_out == int'(tx_out)) n_reversal++;
      end
      prev_out   = pend_valid ? int'(tx_out) : -1;
      pend_valid = m_active;
      pend_ref   = ((t % 2) == 0) ^ pn_ref[m_idx];
      pend_g     = g;
      exp_out_prev = m_active ? (((t % 2) == 0) ^ m_bit ^ pn_ref[m_idx]) : 1'b0;

      // ---- combinational outputs at the coming edge
      exp_start = bit_t && (!m_active || m_slot == 16) && tx_en;
      exp_req   = exp_start || (bit_t && m_active && m_slot < 15);
      check(data_req == exp_req, "data_req");
      check(frame_start == exp_start, "frame_start");
      if (data_req) begin
        if (prev_req_t >= 0 && !exp_start)
          check(t - prev_req_t == CLK_PER_BIT, "one data bit per 40 clocks (2 Mbit/s)");
        prev_req_t = t;
      end

      // ---- model update for the edge
      if (!m_active) m_idx = 0;
      else if (chip_t) begin
        m_idx++;
        if (m_idx == 127) n_wrap++;
      end
      if (bit_t) begin
        tick_k++;
        if (exp_start) begin
          if (m_active) n_back_to_back++;
          else if (seen_first) begin n_restart++; m_idx = 0; end
          if (t_frame0 >= 0 && m_active)
            check(t + 1 - t_frame0 == 17 * CLK_PER_BIT, "frame length 680 clocks");
          t_frame0 = t + 1;
          seen_first = 1;
          m_active = 1; m_slot = 0; m_bit = src[src_ptr]; m_par = m_bit;
          src_ptr++; frame_no++; n_frames++;
        end else if (m_active && m_slot < 15) begin
          m_slot++; m_bit = src[src_ptr]; m_par ^= m_bit; src_ptr++;
        end else if (m_active && m_slot == 15) begin
          m_slot = 16; m_bit = m_par;
          if (m_par) n_par1++; else n_par0++;
          if (dropped && !tx_en) begin n_finish_drop++; dropped = 0; end
        end else begin
          m_active = 0; m_slot = 0; m_bit = 0;
          n_idle_ticks++;
        end
        if (m_active) begin
          g++;
          air_bit[g] = m_bit; air_frame[g] = frame_no; air_slot[g] = m_slot;
          n_air = g + 1;
        end
      end
      @(posedge clk);
      #1;
    end

    // ---- model receiver: despread, vote and check every frame
    for (int f = 0; f < n_frames; f++) begin
      bit par, rx;
      int d;
      par = 0; d = 0;
      for (int i = 0; i < n_air; i++) begin
        if (air_frame[i] != f) continue;
        check(nsamp[i] == CLK_PER_BIT, "40 samples per bit");
        check(votes[i] == 0 || votes[i] == nsamp[i], "despread bit is unanimous");
        rx = (2 * votes[i] > nsamp[i]);
        par ^= rx;
        if (air_slot[i] < 16) begin
          check(rx == src[16 * f + air_slot[i]], "recovered data bit");
          d++;
        end
      end
      check(d == 16, "16 data bits per frame");
      check(par == 1'b0, "frame has even parity");
    end

    $display("frames=%0d back_to_back=%0d restart=%0d parity1=%0d parity0=%0d",
             n_frames, n_back_to_back, n_restart, n_par1, n_par0);
    $display("phase_reversals=%0d pn_wraps=%0d finish_after_drop=%0d idle_ticks=%0d",
             n_reversal, n_wrap, n_finish_drop, n_idle_ticks);
    check(n_frames == 6, "six frames sent");
    check(n_back_to_back > 0, "back-to-back frames happened");
    check(n_restart > 0, "restart from idle happened");
    check(n_par1 > 0 && n_par0 > 0, "both parity values sent");
    check(n_reversal > 0, "BPSK phase reversals happened");
    check(n_wrap > 0, "PN period wrap happened");
    check(n_finish_drop == 1, "frame finished after tx_en dropped");
    check(n_idle_ticks > 0, "idle happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
