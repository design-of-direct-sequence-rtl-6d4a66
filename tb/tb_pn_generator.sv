// tb_pn_generator: self-checking test of the PN code generator.
//
// The reference is the recurrence of x^7 + x^6 + 1 written on the chip
// sequence itself, c[n+7] = c[n] ^ c[n+1], started from the seed's chips.
// The test checks every chip against it, checks that the sequence has
// period 127 and the m-sequence balance (64 ones, 63 zeros per period),
// that step low holds the state, and that load restarts from the seed.
module tb_pn_generator;
  logic       clk = 1'b0;
  logic       rst_n, load, step, chip;
  logic [6:0] state;
  int         checks = 0, failures = 0;
  bit         ref_c[$];

  always #5 clk = ~clk;

  pn_generator dut (.clk, .rst_n, .load, .step, .chip, .state);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    logic [6:0] first_state;
    // With the all-ones seed the first 7 chips are all ones (the register
    // contents read out from the top), then the recurrence takes over.
    for (int i = 0; i < 7; i++) ref_c.push_back(1'b1);
    for (int i = 7; i < 300; i++) ref_c.push_back(ref_c[i-7] ^ ref_c[i-6]);

    rst_n = 1'b0; load = 1'b0; step = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    first_state = state;
    check(state == 7'h7F, "reset loads seed");
    ones = 0;
    for (int n = 0; n < 260; n++) begin
      check(chip == ref_c[n], "chip matches recurrence");
      if (n < 127 && chip) ones++;
      if (n > 0 && n < 127) check(state != first_state, "no repeat inside period");
      if (n == 127) check(state == first_state, "period is 127");
      // insert idle cycles with step low; state must hold
      step = 1'b0;
      if ($urandom_range(0, 3) == 0) begin
        logic [6:0] held;
        held = state;
        @(posedge clk); #1;
        check(state == held, "step low holds state");
      end
      step = 1'b1;
      @(posedge clk); #1;
      step = 1'b0;
    end
    check(ones == 64, "balance: 64 ones per period");
    // load restarts the code
    load = 1'b1; step = 1'b1;
    @(posedge clk); #1;
    load = 1'b0; step = 1'b0;
    check(state == 7'h7F && chip == 1'b1, "load restarts at seed");
    for (int n = 0; n < 20; n++) begin
      check(chip == ref_c[n], "chip after load");
      step = 1'b1; @(posedge clk); #1; step = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
