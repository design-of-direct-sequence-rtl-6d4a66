// tb_bpsk_mod: self-checking test of the spreader / BPSK modulator.
//
// All eight combinations of carrier, data bit and chip are applied in random
// order. The spread output must be data XOR chip at once; one clock later
// tx_out must be the carrier when the spread chip is 0 and its inverse when
// it is 1, and tx_sym the matching +1 / -1 level. With en low both outputs
// must be 0.
module tb_bpsk_mod;
  logic              clk = 1'b0;
  logic              rst_n, en, carrier, data_bit, chip;
  logic              spread, tx_out;
  logic signed [1:0] tx_sym;
  int                checks = 0, failures = 0;
  int                seen[8];

  always #5 clk = ~clk;

  bpsk_mod dut (.clk, .rst_n, .en, .carrier, .data_bit, .chip, .spread, .tx_out, .tx_sym);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_out, exp_en;
    rst_n = 1'b0; en = 1'b0; carrier = 1'b0; data_bit = 1'b0; chip = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 8; i++) seen[i] = 0;
    for (int t = 0; t < 400; t++) begin
      en       = ($urandom_range(0, 7) != 0);
      carrier  = 1'($urandom);
      data_bit = 1'($urandom);
      chip     = 1'($urandom);
      #1;
      check(spread == (data_bit != chip), "spread = data xor chip");
      // phase-shift rule written as a choice, not as an XOR
      if (data_bit == chip) exp_out = carrier;   // spread chip 0: carrier as is
      else                  exp_out = !carrier;  // spread chip 1: inverted carrier
      exp_en = en;
      if (en) seen[{carrier, data_bit, chip}]++;
      @(posedge clk); #1;
      if (exp_en) begin
        check(tx_out == exp_out, "tx_out phase");
        check(tx_sym == (exp_out ? 2'sd1 : -2'sd1), "tx_sym level");
      end else begin
        check(tx_out == 1'b0 && tx_sym == 2'sd0, "silent when disabled");
      end
    end
    for (int i = 0; i < 8; i++) check(seen[i] > 0, "input combination covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
