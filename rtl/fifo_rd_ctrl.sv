// fifo_rd_ctrl: read address and empty flag of the asynchronous FIFO.
//
// Keeps a binary read pointer one bit wider than the address and its Gray
// code. pop advances it. empty is set when the next Gray read pointer equals
// the write pointer synchronised into this domain. empty and the pointers
// are registered; empty rises on the edge of the pop that takes the last
// word and falls two to three rclk edges after a write.
module fifo_rd_ctrl #(
  parameter int unsigned AW = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pop,         // request; ignored while empty
  input  logic [AW:0] wgray_sync,  // write pointer, Gray, in this domain
  output logic        rd,          // pop accepted this cycle
  output logic [AW-1:0] raddr,
  output logic [AW:0] rgray,
  output logic        empty
);
  logic [AW:0] rbin, rbin_nx, rgray_nx;

  assign rd       = pop && !empty;
  assign rbin_nx  = rbin + (AW+1)'(rd);
  assign rgray_nx = (rbin_nx >> 1) ^ rbin_nx;
  assign raddr    = rbin[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbin  <= '0;
      rgray <= '0;
      empty <= 1'b1;
    end else begin
      rbin  <= rbin_nx;
      rgray <= rgray_nx;
      empty <= (rgray_nx == wgray_sync);
    end
  end

  // The pointer crosses clock domains: it may change by at most one bit per clock.
  a_gray_step: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(rgray ^ $past(rgray)) <= 1)
    else $error("rgray changed by more than one bit");
endmodule
