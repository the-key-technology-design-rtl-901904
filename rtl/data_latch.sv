// data_latch: 8-bit latch between the data allocator and the FIFO.
//
// On each rising edge of cap (its clock from the clock conversion counter)
// the byte on din is stored and presented on q if ce is high at that moment;
// otherwise q keeps its last value. Because cap is a
// pulse that is high once per frame, the latch takes its allocator output at
// a single, settled moment and ignores it the rest of the time.
//
// Interface: cap and ce are synchronous to clk; q changes one clk edge after
// cap is first seen high. The capture-on-edge and the ce gating follow the
// document; the single system clock with edge detect and the reset to zero
// are this design's choices.
module data_latch
  import daq_pkg::*;
#(
  parameter int unsigned W = ADC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cap,
  input  logic         ce,
  input  logic [W-1:0] din,
  output logic [W-1:0] q
);
  logic cap_d;
  wire  rise = cap && !cap_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_d <= 1'b0;
      q     <= '0;
    end else begin
      cap_d <= cap;
      if (rise && ce) q <= din;
    end
  end
endmodule
