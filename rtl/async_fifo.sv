// async_fifo: asynchronous FIFO that carries the packed ADC words from the
// acquisition clock to the clock of the downstream processor.
//
// Built from the three parts the document lists: write/read address logic
// with the full and empty flags (fifo_wr_ctrl, fifo_rd_ctrl) and a dual-port
// RAM (fifo_dpram). The pointers cross the clock domains in Gray code through
// two-flip-flop synchronisers (fifo_sync2), so the flags are conservative:
// full may stay set, and empty may stay set, for a few edges after the other
// side has moved.
//
// Write side (wr_clk): a word is written on the first wr_clk edge at which
// wr_ena is seen high after having been low (one word per write pulse), if
// wr_en is high and the FIFO is not full. wr_en comes from the downstream
// system, wr_ena is the per-frame write pulse.
// Read side (rd_clk): on an rd_clk edge with rd_en high and empty low the
// oldest word is popped and appears on rd_data after that edge; rd_data
// holds otherwise. Writing when full and reading when empty are ignored.
// Depth 16 and width 32 follow the document; the Gray-pointer scheme, the
// write-pulse edge detect and the registered read port are this design's.
module async_fifo
  import daq_pkg::*;
#(
  parameter int unsigned W     = WORD_W,
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic         wr_clk,
  input  logic         wr_rst_n,
  input  logic [W-1:0] wr_data,
  input  logic         wr_en,
  input  logic         wr_ena,
  output logic         full,
  input  logic         rd_clk,
  input  logic         rd_rst_n,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic          ena_d, wr, rd;
  logic [AW-1:0] waddr, raddr;
  logic [AW:0]   wgray, rgray, wgray_sync, rgray_sync;
  logic [W-1:0]  ram_q;
  logic          rd_q;

  always_ff @(posedge wr_clk or negedge wr_rst_n)
    if (!wr_rst_n) ena_d <= 1'b0;
    else           ena_d <= wr_ena;

  fifo_wr_ctrl #(.AW(AW)) u_wctl (
    .clk(wr_clk), .rst_n(wr_rst_n), .push(wr_en && wr_ena && !ena_d),
    .rgray_sync(rgray_sync), .wr(wr), .waddr(waddr), .wgray(wgray), .full(full));

  fifo_rd_ctrl #(.AW(AW)) u_rctl (
    .clk(rd_clk), .rst_n(rd_rst_n), .pop(rd_en),
    .wgray_sync(wgray_sync), .rd(rd), .raddr(raddr), .rgray(rgray), .empty(empty));

  fifo_sync2 #(.W(AW+1)) u_w2r (.clk(rd_clk), .rst_n(rd_rst_n), .d(wgray), .q(wgray_sync));
  fifo_sync2 #(.W(AW+1)) u_r2w (.clk(wr_clk), .rst_n(wr_rst_n), .d(rgray), .q(rgray_sync));

  fifo_dpram #(.W(W), .DEPTH(DEPTH), .AW(AW)) u_ram (
    .wclk(wr_clk), .we(wr), .waddr(waddr), .wdata(wr_data),
    .rclk(rd_clk), .re(rd), .raddr(raddr), .rdata(ram_q));

  // Read data register: zero after reset, then the last popped word.
  always_ff @(posedge rd_clk or negedge rd_rst_n)
    if (!rd_rst_n) rd_q <= 1'b0;
    else if (rd)   rd_q <= 1'b1;

  assign rd_data = rd_q ? ram_q : '0;

  initial assert (DEPTH == (1 << AW) && DEPTH >= 4)
    else $error("DEPTH must be a power of two, at least 4");
endmodule
