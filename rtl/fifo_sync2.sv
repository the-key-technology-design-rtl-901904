// fifo_sync2: two-flip-flop synchroniser for a Gray-coded FIFO pointer.
//
// Brings a multi-bit value that changes at most one bit at a time into the
// clk domain. The output is the input delayed by two clk edges. Reset clears
// both stages.
module fifo_sync2 #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
