// tb_freq_divider: self-checking test of the tick divider.
//
// Two dividers (by 10 and by 2) are fed a random tick stream. A reference
// count of input ticks predicts that the output fires together with every
// DIV-th input tick and never otherwise. Reset in the middle of the run must
// restart the count.
module tb_freq_divider;
  logic clk = 1'b0;
  logic rst_n;
  logic tick_in;
  logic tick10, tick2;
  int   checks = 0, failures = 0;
  int   n_in, n10, n2;

  always #5 clk = ~clk;

  freq_divider #(.DIV(10)) dut10 (.clk, .rst_n, .tick_in, .tick_out(tick10));
  freq_divider #(.DIV(2))  dut2  (.clk, .rst_n, .tick_in, .tick_out(tick2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; tick_in = 1'b0;
    n_in = 0; n10 = 0; n2 = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // reset once in the middle, with the count part way through
      if (cyc == 1003) begin
        rst_n = 1'b0; tick_in = 1'b0;
        @(posedge clk); #1;
        rst_n = 1'b1; n_in = 0;
      end
      tick_in = ($urandom_range(0, 2) != 0);
      #1;
      check(tick10 == (tick_in && (n_in % 10 == 9)), "divide-by-10 output");
      check(tick2  == (tick_in && (n_in % 2 == 1)),  "divide-by-2 output");
      if (tick10) n10++;
      if (tick2)  n2++;
      @(posedge clk);
      if (tick_in) n_in++;
      #1;
    end
    check(n10 > 50 && n2 > 300, "dividers produced ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
