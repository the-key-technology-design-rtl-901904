// tb_async_fifo: self-checking test of the 16x32 asynchronous FIFO.
//
// The write clock (period 10) and read clock (period 14) are unrelated. The
// writer raises wr_ena for one or more clocks per word (one word per rising
// edge); the reader pops in bursts. Phases: fill until full and try to write
// more (those words must be dropped), drain until empty and try to read more
// (rd_data must not change), then random traffic. Every popped word is
// compared with a scoreboard queue. It also replays the published example:
// words 1 and 2 written, then read back as 1 and 2.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic wr_en = 0, wr_ena = 0, rd_en = 0, full, empty;
  logic [31:0] sb [$];
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_dropped = 0, n_written = 0, n_read = 0;

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  async_fifo dut (.wr_clk(wclk), .wr_rst_n(wrst_n), .wr_data, .wr_en, .wr_ena, .full,
                  .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data, .empty);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one write pulse: wr_ena high for 'hold' clocks; the word goes in if
  // wr_en is high and full is low on the first of them
  task automatic write_word(input logic [31:0] v, input int hold, input logic en = 1'b1);
    @(negedge wclk);
    wr_data = v; wr_en = en; wr_ena = 1;
    if (en && !full) begin sb.push_back(v); n_written++; end
    else n_dropped++;
    repeat (hold) @(negedge wclk);
    wr_ena = 0;
    @(negedge wclk);
  endtask

  task automatic read_word();
    logic was_empty;
    logic [31:0] prev_data;
    @(negedge rclk);
    was_empty = empty; prev_data = rd_data;
    rd_en = 1;
    @(negedge rclk);
    rd_en = 0;
    if (!was_empty) begin
      check(sb.size() > 0, "read with empty scoreboard");
      if (sb.size() > 0) begin
        check(rd_data == sb[0], "read data order");
        if (rd_data != sb[0]) $display("  got %h exp %h", rd_data, sb[0]);
        void'(sb.pop_front());
      end
      n_read++;
    end else begin
      check(rd_data == prev_data, "read while empty leaves data");
      n_empty++;
    end
  endtask

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    check(empty && !full && rd_data == 0, "reset flags");
    // published example
    write_word(32'h1, 1);
    write_word(32'h2, 1);
    repeat (4) @(posedge rclk);
    check(!empty, "not empty after writes");
    read_word(); read_word();
    repeat (4) @(posedge rclk);
    check(empty, "empty after reading both");
    // wr_en low: no write
    write_word(32'hdead, 2, 1'b0);
    repeat (5) @(posedge rclk);
    check(empty, "wr_en low blocks write");
    // long wr_ena: a single word
    write_word(32'h55, 6);
    repeat (5) @(posedge rclk);
    read_word();
    repeat (5) @(posedge rclk);
    check(empty && sb.size() == 0, "long pulse writes one word");
    // fill to full
    for (int i = 0; i < 20; i++) begin
      write_word($urandom, 1);
      if (full) n_full++;
    end
    check(full, "full after 20 writes");
    check(sb.size() == 16, "exactly 16 words stored");
    // drain
    for (int i = 0; i < 20; i++) read_word();
    check(empty && sb.size() == 0, "empty after drain");
    // random concurrent traffic
    fork
      for (int i = 0; i < 300; i++) begin
        write_word($urandom, $urandom_range(1, 3));
        if (full) n_full++;
        repeat ($urandom_range(0, 3)) @(negedge wclk);
      end
      for (int i = 0; i < 300; i++) begin
        read_word();
        repeat ($urandom_range(0, 4)) @(negedge rclk);
      end
    join
    repeat (10) @(posedge rclk);
    while (!empty) read_word();
    check(sb.size() == 0, "all written words read");
    check(n_full > 0, "full occurred");
    check(n_empty > 0, "empty read occurred");
    check(n_dropped > 0, "dropped writes occurred");
    $display("written=%0d read=%0d dropped=%0d full=%0d empty_reads=%0d",
             n_written, n_read, n_dropped, n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
