// tb_tx_control: self-checking test of the framing controller.
//
// Bit ticks come every 4 clocks. The testbench supplies random serial data
// and a parity input computed from the bits it handed over, and follows the
// frame format (16 data bits, then the parity bit, then the next frame while
// tx_en is high) with its own slot counter. It checks tx_bit, data_req,
// frame_start, in_parity, active and bit_index after every tick, that
// nothing changes between ticks, that tx_en dropped in the middle of a frame
// lets the frame finish, and that the transmitter then stays idle until
// tx_en returns.
module tb_tx_control;
  logic       clk = 1'b0;
  logic       rst_n, tx_en, bit_tick, data_in, parity_in;
  logic       data_req, par_clear, frame_start, tx_bit, active, in_parity;
  logic [4:0] bit_index;
  int         checks = 0, failures = 0;
  int         n_frames = 0, n_idle_ticks = 0, n_finish_after_drop = 0;

  always #5 clk = ~clk;

  tx_control dut (
    .clk, .rst_n, .tx_en, .bit_tick, .data_in, .parity_in,
    .data_req, .par_clear, .frame_start, .tx_bit, .active, .in_parity, .bit_index
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit   m_active;       // model: a frame is on the air
    int   m_slot;         // model: position of the bit on the air (0..16)
    bit   m_bit;          // model: bit on the air
    bit   m_par;          // parity of the data bits handed over in this frame
    bit   exp_req, exp_start, dropped;
    rst_n = 1'b0; tx_en = 1'b0; bit_tick = 1'b0; data_in = 1'b0; parity_in = 1'b0;
    m_active = 0; m_slot = 0; m_bit = 0; m_par = 0; dropped = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 130; k++) begin
      // tx_en schedule (in ticks): off, on for 3 full frames plus 5 bits,
      // off for 10 ticks after that frame, then on again.
      tx_en = (k >= 3 && k < 3 + 3 * 17 + 5) || (k >= 3 + 4 * 17 + 10);
      if (k == 3 + 3 * 17 + 5) dropped = 1;
      data_in   = 1'($urandom);
      parity_in = m_par;
      // three clocks between ticks: outputs must hold
      for (int c = 0; c < 3; c++) begin
        bit_tick = 1'b0;
        #1;
        check(data_req == 1'b0 && frame_start == 1'b0, "no request between ticks");
        check(tx_bit == m_bit && active == m_active, "outputs hold between ticks");
        @(posedge clk); #1;
      end
      // the tick
      bit_tick = 1'b1;
      exp_start = (!m_active || m_slot == 16) && tx_en;
      exp_req   = exp_start || (m_active && m_slot < 15);
      #1;
      check(data_req == exp_req, "data_req");
      check(frame_start == exp_start, "frame_start");
      check(par_clear == exp_start, "par_clear");
      if (exp_start) begin
        m_active = 1; m_slot = 0; m_bit = data_in; m_par = data_in; n_frames++;
      end else if (m_active && m_slot < 15) begin
        m_slot++; m_bit = data_in; m_par ^= data_in;
      end else if (m_active && m_slot == 15) begin
        m_slot = 16; m_bit = m_par;
        if (dropped && !tx_en) n_finish_after_drop++;
      end else begin
        if (m_active && m_slot == 16) dropped = 0;
        m_active = 0; m_slot = 0; m_bit = 0;
        n_idle_ticks++;
      end
      @(posedge clk); #1;
      bit_tick = 1'b0;
      check(tx_bit == m_bit, "tx_bit");
      check(active == m_active, "active");
      check(in_parity == (m_active && m_slot == 16), "in_parity");
      check(bit_index == 5'(m_slot), "bit_index");
    end
    check(n_frames == 7, "seven frames started");
    check(n_finish_after_drop == 1, "frame finished after tx_en dropped");
    check(n_idle_ticks >= 10, "idle period seen");
    $display("frames=%0d idle_ticks=%0d", n_frames, n_idle_ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
