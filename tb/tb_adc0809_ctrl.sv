// tb_adc0809_ctrl: self-checking test of the ADC0809 control state machine
// against the behavioural converter model. For each conversion it checks
// that START and ALE form a single one-clock pulse, that OE is high for
// exactly two clocks and only after end of conversion, that LOCK is the
// second OE clock, that q carries the byte presented for that conversion,
// that adda stays 1, and that one conversion takes conv_clks + 5 clocks.
module tb_adc0809_ctrl;
  logic clk = 0, rst_n = 0;
  logic [7:0] vin, conv_clks, d, q;
  logic eoc, ale, start, oe, adda, lock;
  int conversions;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc0809_ctrl dut (.clk, .rst_n, .d, .eoc, .ale, .start, .oe, .adda, .lock, .q);
  adc0809_model adc (.clk, .rst_n, .vin, .conv_clks, .start, .ale, .adda, .oe,
                     .eoc, .d, .conversions);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected bytes: vin as sampled at each start, in order.
  logic [7:0] expq [$];
  int last_start = -1, cyc = 0, oe_run = 0, n_lock = 0, prev_start = 0;
  logic prev_lock = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      check(ale == start, "ale follows start");
      check(adda == 1'b1, "adda constant 1");
      if (start) begin
        check(!prev_start, "start is a single-clock pulse");
        check(oe == 0, "no oe during start");
        if (last_start >= 0)
          check(cyc - last_start == int'(conv_clks) + 5, "conversion period");
        last_start = cyc;
        expq.push_back(vin);
      end
      if (oe) begin
        oe_run++;
        check(eoc == 1'b1, "oe only after end of conversion");
      end else begin
        if (oe_run != 0) check(oe_run == 2, "oe high for two clocks");
        oe_run = 0;
      end
      if (lock) check(oe && oe_run == 2, "lock in second oe clock");
      if (prev_lock) begin
        // q changed on the edge that entered LOCK; still valid one clock later
        check(expq.size() > 0 && q == expq[0], "q holds converted byte");
        if (expq.size() > 0) void'(expq.pop_front());
        n_lock++;
      end
      prev_start = start;
      prev_lock  = lock;
    end
  end

  initial begin
    vin = 8'h00; conv_clks = 8'd8;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(q == 0, "q reset value");
    for (int i = 0; i < 40; i++) begin
      @(posedge start);
      @(negedge clk);
      vin = 8'($urandom);     // next analog value, sampled at the next start
      if (i == 20) begin
        // change conversion time between conversions: wait for idle first
        @(posedge lock); @(negedge clk);
        conv_clks = 8'd3;
        last_start = -1;
      end
    end
    repeat (30) @(posedge clk);
    check(n_lock >= 38, "conversions completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
