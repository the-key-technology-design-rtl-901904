// daq_top: FPGA part of an ADC0809 data acquisition front end.
//
// The ADC0809 converts continuously under the control state machine
// (adc0809_ctrl). Each conversion raises the converter's output enable oe,
// and oe paces the rest of the write side: the data allocator (data_alloc)
// deals the converted bytes round-robin onto four lanes, and the clock
// conversion counter (clk_conv) counts oe edges modulo 7 and raises CLK1..CLK5
// in turn, one per conversion. CLKk makes latch k (data_latch) take its lane,
// and CLK5 writes the four latched bytes, packed into one 32-bit word with
// latch 1 in bits 7:0, into the 16-word asynchronous FIFO (async_fifo). The
// downstream processor reads the FIFO in its own clock domain (clk1) using re
// and empty, and controls writing through we, watching full.
//
// One FIFO word is produced every 7 conversions and holds 4 consecutive
// conversion results (the 3 conversions in between are not stored). The byte
// taken by the allocator at an oe edge is the result of the conversion before
// it (the controller updates q at the end of the oe window); the first word
// after reset therefore starts with a zero byte.
//
// Clocks: clk drives the converter controller, allocator, counter, latches
// and the FIFO write port; clk1 drives the FIFO read port. rst_n resets both
// domains asynchronously. The blocks and their connections follow the
// document's top-level schematic; running every write-side block on clk with
// edge-detected pacing signals (instead of using oe and CLK1..CLK5 as
// clocks), the latch ce tied to we, and the reset are this design's choices.
module daq_top
  import daq_pkg::*;
(
  input  logic              clk,
  input  logic              clk1,
  input  logic              rst_n,
  input  logic [ADC_W-1:0]  d,
  input  logic              eoc,
  output logic              ale,
  output logic              start,
  output logic              oe,
  output logic              adda,
  output logic              lock,
  input  logic              we,
  input  logic              re,
  output logic              full,
  output logic              empty,
  output logic [WORD_W-1:0] q
);
  logic [ADC_W-1:0]            adc_q;
  logic [LANES-1:0][ADC_W-1:0] lane;
  logic [LANES-1:0][ADC_W-1:0] latched;
  logic [PHASES-1:0]           phase;

  adc0809_ctrl u_adc (
    .clk(clk), .rst_n(rst_n), .d(d), .eoc(eoc),
    .ale(ale), .start(start), .oe(oe), .adda(adda), .lock(lock), .q(adc_q));

  data_alloc u_alloc (
    .clk(clk), .rst_n(rst_n), .step(oe), .a(adc_q), .q(lane));

  clk_conv u_upcount (
    .clk(clk), .rst_n(rst_n), .step(oe), .clk_out(phase));

  for (genvar i = 0; i < LANES; i++) begin : g_latch
    data_latch u_latch (
      .clk(clk), .rst_n(rst_n), .cap(phase[i]), .ce(we),
      .din(lane[i]), .q(latched[i]));
  end

  async_fifo u_fifo (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_data(latched), .wr_en(we),
    .wr_ena(phase[PHASES-1]), .full(full),
    .rd_clk(clk1), .rd_rst_n(rst_n), .rd_en(re), .rd_data(q), .empty(empty));
endmodule
