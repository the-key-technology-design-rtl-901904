// tb_clk_conv: self-checking test of the clock conversion counter. Applies
// step pulses of random spacing and checks after every clock that at most
// one of CLK1..CLK5 is high, that CLKk is high exactly while the step count
// modulo 7 equals k, and that over 70 steps each output pulsed 10 times.
module tb_clk_conv;
  logic clk = 0, rst_n = 0, step = 0;
  logic [4:0] clk_out, prev = 0;
  int n = 0, checks = 0, failures = 0;
  int pulses [5];

  always #5 clk = ~clk;

  clk_conv dut (.clk, .rst_n, .step, .clk_out);

  function automatic logic [4:0] expect_out(input int steps);
    int k = steps % 7;
    return (k >= 1 && k <= 5) ? 5'(1 << (k - 1)) : 5'b0;
  endfunction

  initial begin
    foreach (pulses[i]) pulses[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++; if (clk_out != 0) failures++;
    for (int s = 0; s < 70; s++) begin
      @(negedge clk) step = 1; n++;
      repeat ($urandom_range(1, 4)) begin
        @(negedge clk);
        checks++;
        if (clk_out != expect_out(n)) begin
          failures++;
          $display("FAIL after %0d steps: %b exp %b", n, clk_out, expect_out(n));
        end
      end
      step = 0;
      repeat ($urandom_range(1, 4)) begin
        @(negedge clk);
        checks++;
        if (clk_out != expect_out(n)) failures++;
      end
      for (int k = 0; k < 5; k++) if (clk_out[k] && !prev[k]) pulses[k]++;
      prev = clk_out;
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (pulses[k] != 10) begin
        failures++;
        $display("FAIL CLK%0d pulsed %0d times", k + 1, pulses[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
