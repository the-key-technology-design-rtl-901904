// fifo_dpram: dual-port RAM that stores the FIFO words.
//
// A plain memory array with one write port in the wclk domain and one read
// port in the rclk domain. A write stores wdata at waddr on a rising wclk
// edge while we is high. A read copies the word at raddr to rdata on a rising
// rclk edge while re is high; rdata holds otherwise. There is no reset of the
// array (the FIFO never reads a word it has not written). The array is
// written so that FPGA tools can map it to block RAM. The document names this
// RAM; its port timing is this design's choice.
module fifo_dpram #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          rclk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge wclk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge rclk)
    if (re) rdata <= mem[raddr];
endmodule
