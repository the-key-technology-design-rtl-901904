// tb_data_latch: self-checking test of the 8-bit latch. Drives random cap
// pulses, ce levels and input bytes, and checks q after every clock against
// a reference that loads din only at a rising edge of cap with ce high.
// Also replays the published example: din counting up, ce low then high,
// so q stays 0 and then follows din.
module tb_data_latch;
  logic clk = 0, rst_n = 0, cap = 0, ce = 0;
  logic [7:0] din = 0, q, ref_q = 0;
  logic cap_prev = 0;
  int checks = 0, failures = 0, loads = 0;

  always #5 clk = ~clk;

  data_latch dut (.clk, .rst_n, .cap, .ce, .din, .q);

  task automatic cmp(input string what);
    checks++;
    if (q != ref_q) begin
      failures++;
      $display("FAIL %s: q=%0d exp=%0d at %0t", what, q, ref_q, $time);
    end
  endtask

  // drive inputs at negedge; the reference updates as of the next posedge
  task automatic cycle(input logic c, input logic e, input logic [7:0] v);
    @(negedge clk);
    cap = c; ce = e; din = v;
    if (c && !cap_prev && e) begin ref_q = v; loads++; end
    cap_prev = c;
    @(negedge clk);
    cmp("after edge");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cmp("reset");
    // counting example: cap toggles every clock
    for (int i = 0; i < 15; i++) begin
      cycle(1'b1, i >= 7 && i <= 13, 8'(i));
      cycle(1'b0, i >= 7 && i <= 13, 8'(i));
    end
    checks++;
    if (q != 8'd13) failures++;
    // random
    for (int i = 0; i < 2000; i++)
      cycle(1'($urandom), 1'($urandom), 8'($urandom));
    $display("loads=%0d", loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
