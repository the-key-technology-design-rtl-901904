// data_alloc: one-to-four data allocator (demultiplexer) for the ADC byte.
//
// Every rising edge of step (the ADC's output enable) sends the byte on a to
// the next output in turn: the first edge to q[0] (Q1), the second to q[1]
// (Q2), and so on, wrapping after the last. A 2-bit counter selects the
// output; each output register keeps its byte until its turn comes round.
//
// Interface: step is a level signal synchronous to clk; its rising edge is
// detected internally, and the selected output changes one clk edge after
// step is first seen high. The round-robin order and the four outputs follow
// the document; running on one system clock with an edge detect (instead of
// clocking the block from step) and the reset to zero are this design's
// choices.
module data_alloc #(
  parameter int unsigned W     = daq_pkg::ADC_W,
  parameter int unsigned LANES = daq_pkg::LANES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     step,
  input  logic [W-1:0]             a,
  output logic [LANES-1:0][W-1:0]  q
);
  localparam int unsigned SW = (LANES > 1) ? $clog2(LANES) : 1;

  logic          step_d;
  logic [SW-1:0] sel;
  wire           rise = step && !step_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_d <= 1'b0;
      sel    <= '0;
      q      <= '0;
    end else begin
      step_d <= step;
      if (rise) begin
        q[sel] <= a;
        sel    <= (sel == SW'(LANES - 1)) ? '0 : sel + 1'b1;
      end
    end
  end
endmodule
