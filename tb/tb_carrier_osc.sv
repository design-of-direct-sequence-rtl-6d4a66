// tb_carrier_osc: self-checking test of the carrier oscillator.
//
// Checks, for the default (HALF_CYCLES = 1, carrier = f_clk / 2) and for a
// slower instance (HALF_CYCLES = 3), that the carrier starts high after
// reset, stays high for HALF_CYCLES clocks and low for HALF_CYCLES clocks,
// and that period_tick marks exactly the last clock of every period.
module tb_carrier_osc;
  logic clk = 1'b0;
  logic rst_n;
  logic car1, tick1, car3, tick3;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  carrier_osc                    dut1 (.clk, .rst_n, .carrier(car1), .period_tick(tick1));
  carrier_osc #(.HALF_CYCLES(3)) dut3 (.clk, .rst_n, .carrier(car3), .period_tick(tick3));

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
    int n1, n3;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    n1 = 0; n3 = 0;
    for (int t = 0; t < 600; t++) begin
      #1;
      // t counts clocks since reset released: phase t mod period
      check(car1  == ((t % 2) < 1), "carrier HALF=1 level");
      check(tick1 == ((t % 2) == 1), "period tick HALF=1");
      check(car3  == ((t % 6) < 3), "carrier HALF=3 level");
      check(tick3 == ((t % 6) == 5), "period tick HALF=3");
      if (tick1) n1++;
      if (tick3) n3++;
      @(posedge clk);
    end
    // frequency check: ticks per 600 clocks
    check(n1 == 300, "HALF=1 carrier is f_clk/2");
    check(n3 == 100, "HALF=3 carrier is f_clk/6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
