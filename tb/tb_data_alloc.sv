// tb_data_alloc: self-checking test of the one-to-four data allocator.
// Applies step pulses of random length and spacing with a random byte on a,
// and compares all four outputs after every clock with a reference that
// sends the n-th byte to output (n-1) mod 4 and keeps the others.
module tb_data_alloc;
  logic clk = 0, rst_n = 0, step = 0;
  logic [7:0] a = 0;
  logic [3:0][7:0] q;
  logic [7:0] ref_q [4];
  int sel = 0, checks = 0, failures = 0, steps = 0;

  always #5 clk = ~clk;

  data_alloc dut (.clk, .rst_n, .step, .a, .q);

  initial begin
    foreach (ref_q[i]) ref_q[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      // step high for 1..4 clocks with a new byte on a
      @(negedge clk);
      a = 8'($urandom); step = 1;
      ref_q[sel] = a; sel = (sel + 1) % 4; steps++;
      repeat (1 + $urandom_range(0, 3)) begin
        @(negedge clk);
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (q[i] != ref_q[i]) begin
            failures++;
            $display("FAIL step %0d lane %0d got %h exp %h", n, i, q[i], ref_q[i]);
          end
        end
        a = 8'($urandom);   // changing a while step stays high must not matter
      end
      step = 0;
      repeat ($urandom_range(1, 3)) begin
        @(negedge clk);
        a = 8'($urandom);
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (q[i] != ref_q[i]) failures++;
        end
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
