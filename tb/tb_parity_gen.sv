// tb_parity_gen: self-checking test of the serial parity generator.
//
// Random 16-bit words are sent one bit at a time with random gaps (bit_valid
// low). After the last bit the even-parity output must equal the XOR of the
// word's bits (reduction XOR computed by the testbench), and the odd-parity
// instance its inverse. clear together with the first bit restarts the sum.
module tb_parity_gen;
  logic clk = 1'b0;
  logic rst_n, clear, bit_valid, bit_in;
  logic par_even, par_odd;
  int   checks = 0, failures = 0;
  int   n_one = 0, n_zero = 0;

  always #5 clk = ~clk;

  parity_gen                dut_e (.clk, .rst_n, .clear, .bit_valid, .bit_in, .parity(par_even));
  parity_gen #(.ODD(1'b1))  dut_o (.clk, .rst_n, .clear, .bit_valid, .bit_in, .parity(par_odd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] word;
    logic        run;
    rst_n = 1'b0; clear = 1'b0; bit_valid = 1'b0; bit_in = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(par_even == 1'b0 && par_odd == 1'b1, "reset value");
    for (int w = 0; w < 200; w++) begin
      word = 16'($urandom);
      if (w == 0) word = 16'h0000;
      if (w == 1) word = 16'hFFFF;
      if (w == 2) word = 16'h0001;
      run = 1'b0;
      for (int b = 0; b < 16; b++) begin
        while ($urandom_range(0, 3) == 0) begin
          bit_valid = 1'b0; bit_in = 1'($urandom); clear = 1'b0;
          @(posedge clk); #1;
        end
        bit_valid = 1'b1; bit_in = word[b]; clear = (b == 0);
        @(posedge clk); #1;
        run = run ^ word[b];
        check(par_even == run, "running parity");
      end
      bit_valid = 1'b0; clear = 1'b0;
      check(par_even == ^word,  "even parity of word");
      check(par_odd  == ~^word, "odd parity of word");
      if (^word) n_one++; else n_zero++;
    end
    check(n_one > 0 && n_zero > 0, "both parity values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
