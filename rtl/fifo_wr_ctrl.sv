// fifo_wr_ctrl: write address and full flag of the asynchronous FIFO.
//
// Keeps a binary write pointer one bit wider than the address and its Gray
// code. push advances it. full is set when the next Gray pointer equals the
// read pointer (already synchronised into this domain) with its two top bits
// inverted, i.e. the writer is one lap ahead of the reader. full and the
// pointers are registered; full rises on the edge of the push that fills the
// last free word and falls two to three wclk edges after a read frees one.
module fifo_wr_ctrl #(
  parameter int unsigned AW = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,        // request; ignored while full
  input  logic [AW:0] rgray_sync,  // read pointer, Gray, in this domain
  output logic        wr,          // push accepted this cycle
  output logic [AW-1:0] waddr,
  output logic [AW:0] wgray,
  output logic        full
);
  logic [AW:0] wbin, wbin_nx, wgray_nx;

  assign wr       = push && !full;
  assign wbin_nx  = wbin + (AW+1)'(wr);
  assign wgray_nx = (wbin_nx >> 1) ^ wbin_nx;
  assign waddr    = wbin[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbin  <= '0;
      wgray <= '0;
      full  <= 1'b0;
    end else begin
      wbin  <= wbin_nx;
      wgray <= wgray_nx;
      full  <= (wgray_nx == {~rgray_sync[AW:AW-1], rgray_sync[AW-2:0]});
    end
  end

  // The pointer crosses clock domains: it may change by at most one bit per clock.
  a_gray_step: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(wgray ^ $past(wgray)) <= 1)
    else $error("wgray changed by more than one bit");
endmodule
