// clk_conv: clock conversion counter (five-phase pulse generator).
//
// Counts rising edges of step (the ADC's output enable) modulo MODULUS = 7.
// While the count is k (1..PHASES) output clk_out[k-1] is high; at counts 0
// and 6 all outputs are low. So each output is a pulse one step-period long,
// and CLK1..CLK5 follow each other on consecutive conversions: CLK1..CLK4
// clock the four latches, CLK5 is the FIFO write pulse.
//
// Interface: step is synchronous to clk; counter and outputs change one clk
// edge after step is first seen high. Outputs are registered, so they carry
// no decode glitches. The count range 0..6 and the one-period pulses follow
// the document; the single-clock edge detect and reset are this design's
// choices.
module clk_conv #(
  parameter int unsigned PHASES  = daq_pkg::PHASES,
  parameter int unsigned MODULUS = daq_pkg::PHASE_MOD
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              step,
  output logic [PHASES-1:0] clk_out
);
  localparam int unsigned CW = $clog2(MODULUS);

  logic          step_d;
  logic [CW-1:0] cnt;
  logic [CW-1:0] cnt_nx;
  wire           rise = step && !step_d;

  assign cnt_nx = (cnt == CW'(MODULUS - 1)) ? '0 : cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_d  <= 1'b0;
      cnt     <= '0;
      clk_out <= '0;
    end else begin
      step_d <= step;
      if (rise) begin
        cnt <= cnt_nx;
        for (int k = 0; k < PHASES; k++)
          clk_out[k] <= (cnt_nx == CW'(k + 1));
      end
    end
  end

  initial assert (MODULUS > PHASES) else $error("MODULUS must exceed PHASES");
endmodule
