// tb_daq_top: end-to-end test of the acquisition front end at its default
// sizes, with the converter modelled by adc0809_model and the downstream
// processor played by this testbench.
//
// The converter is fed a new random analog value every clock. The processor
// follows the documented protocol: it keeps write enable high until the FIFO
// reports full, then drops write enable and reads (re high, in its own clock
// domain clk1) until the FIFO reports empty, then enables writing again. It
// also drops write enable for single random conversions, so some latches and
// FIFO writes are skipped. A reference model, built only from the top's pins,
// counts oe edges, deals each byte round-robin onto four lanes, loads latch k
// on conversion count 7m+k (k = 1..4, if we is high) and writes a word on
// count 7m+5 (if we is high); every word read out is compared with it.
// Counted mechanisms: words written, words skipped by we, FIFO full, FIFO
// drained to empty, reads while empty; each must happen at least once.
module tb_daq_top;
  logic clk = 0, clk1 = 0, rst_n = 0;
  logic [7:0] d, vin = 0, conv_clks = 8'd8;
  logic eoc, ale, start, oe, adda, lock, we = 1, re = 0, full, empty;
  logic [31:0] q;
  int conversions;
  int checks = 0, failures = 0;

  always #5 clk  = ~clk;
  always #3 clk1 = ~clk1;

  daq_top dut (.clk, .clk1, .rst_n, .d, .eoc, .ale, .start, .oe, .adda, .lock,
               .we, .re, .full, .empty, .q);
  adc0809_model adc (.clk, .rst_n, .vin, .conv_clks, .start, .ale, .adda, .oe,
                     .eoc, .d, .conversions);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- reference model from the pins ----------------
  logic [7:0]  samples [$];     // analog value taken at each start
  logic [7:0]  ref_lane [4], ref_latch [4];
  logic [31:0] expect_q [$];
  logic [7:0]  prev_result = 0; // result of the previous conversion
  logic        oe_d = 0, full_d = 0;
  int n_oe = 0, n_written = 0, n_skipped = 0, n_full = 0, n_drained = 0;
  int n_empty_reads = 0, n_read = 0, rounds = 0;
  bit drain = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (start) samples.push_back(vin);
      if (oe && !oe_d) begin
        int ph;
        n_oe++;
        ph = n_oe % 7;
        ref_lane[(n_oe - 1) % 4] = prev_result;
        if (ph >= 1 && ph <= 4 && we) ref_latch[ph - 1] = ref_lane[ph - 1];
        if (ph == 5) begin
          if (we) begin
            expect_q.push_back({ref_latch[3], ref_latch[2], ref_latch[1], ref_latch[0]});
            n_written++;
          end else n_skipped++;
        end
        // the byte this conversion produces is taken at the next oe edge
        prev_result = samples.size() > 0 ? samples.pop_front() : 8'h00;
      end
      if (full && !full_d) n_full++;
      oe_d   <= oe;
      full_d <= full;
    end
  end

  // analog input changes every clock
  always @(negedge clk) vin <= 8'($urandom);

  // ---------------- write-side control (changes we only at start) ----------
  always @(negedge clk) begin
    if (rst_n && start) begin
      if (drain) we <= 1'b0;
      else if (full) begin
        we    <= 1'b0;
        drain <= 1'b1;   // ask the reader to empty the FIFO
      end else we <= ($urandom_range(0, 9) != 0);
    end
  end

  // ---------------- reader in the clk1 domain ----------------
  bit pop_pending = 0;
  int got_words = 0;
  always @(negedge clk1) begin
    if (pop_pending) begin
      check(expect_q.size() > 0, "read with nothing expected");
      if (expect_q.size() > 0) begin
        check(q == expect_q[0], "FIFO word matches reference");
        if (q != expect_q[0]) $display("  got %h exp %h", q, expect_q[0]);
        void'(expect_q.pop_front());
      end
      n_read++;
      pop_pending = 0;
    end
    if (re && empty && got_words > 0) begin
      n_empty_reads++;
      re <= 0;
      drain = 0;       // burst over
      n_drained++;
      got_words = 0;
    end else if (drain) re <= 1;
  end
  always @(posedge clk1) if (re && !empty) begin pop_pending = 1; got_words++; end

  initial begin
    foreach (ref_lane[i])  ref_lane[i]  = 0;
    foreach (ref_latch[i]) ref_latch[i] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    check(empty && !full && q == 0, "reset state");
    wait (n_drained == 3);
    repeat (50) @(posedge clk);
    check(n_written > 0,  "words written");
    check(n_skipped > 0,  "frames skipped by we");
    check(n_full > 0,     "FIFO full");
    check(n_drained > 0,  "FIFO drained to empty");
    check(n_empty_reads > 0, "read reached empty");
    check(n_read >= 48,   "words read");
    check(adda == 1'b1,   "channel A");
    $display("conversions=%0d words_written=%0d skipped=%0d read=%0d full=%0d drained=%0d",
             n_oe, n_written, n_skipped, n_read, n_full, n_drained);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: drained=%0d full=%0d", n_drained, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
