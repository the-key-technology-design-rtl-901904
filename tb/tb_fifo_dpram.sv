// tb_fifo_dpram: self-checking test of the dual-port RAM. Writes random
// words to random addresses on one clock and reads random addresses on an
// unrelated clock, comparing each read with a reference array; reads are
// only made of addresses whose last write is finished.
module tb_fifo_dpram;
  logic wclk = 0, rclk = 0, we = 0, re = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata, ref_mem [16];
  int checks = 0, failures = 0;

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  fifo_dpram dut (.wclk, .we, .waddr, .wdata, .rclk, .re, .raddr, .rdata);

  initial begin
    // fill every word
    for (int i = 0; i < 16; i++) begin
      @(negedge wclk) we = 1; waddr = 4'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge wclk) we = 0;
    for (int round = 0; round < 100; round++) begin
      // a few random writes
      repeat ($urandom_range(0, 3)) begin
        @(negedge wclk) we = 1; waddr = 4'($urandom); wdata = $urandom;
        ref_mem[waddr] = wdata;
      end
      @(negedge wclk) we = 0;
      // a few reads
      repeat ($urandom_range(1, 4)) begin
        @(negedge rclk) re = 1; raddr = 4'($urandom);
        @(negedge rclk) re = 0;
        checks++;
        if (rdata != ref_mem[raddr]) begin
          failures++;
          $display("FAIL addr %0d got %h exp %h", raddr, rdata, ref_mem[raddr]);
        end
        // rdata holds while re is low
        @(negedge rclk);
        checks++;
        if (rdata != ref_mem[raddr]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
