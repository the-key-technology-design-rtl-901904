// adc0809_ctrl: control state machine for an ADC0809 converter.
//
// One conversion takes the states IDLE -> START -> WAIT -> OE -> LOCK -> IDLE
// (encoded 0..4). START raises ALE and START for one clock; WAIT holds until
// the converter reports end of conversion on eoc; OE enables the converter's
// output bus for two clocks; on the clock edge that enters LOCK the byte on d
// is stored in an internal register and presented on q, where it stays until
// the next conversion. lock is high during LOCK. adda selects channel A and is
// held constant.
//
// Interface: all outputs are decoded from the state register and change just
// after a rising edge of clk; q changes on the edge that enters LOCK. A full
// conversion takes 4 clocks plus the time spent in WAIT (at least 1 clock).
// The five states, their order and the constant adda = 1 follow the
// published waveform of this controller. The eoc level that ends WAIT
// (EOC_DONE = 1, as on the ADC0809 datasheet) and the reset are this
// design's choices.
module adc0809_ctrl
  import daq_pkg::*;
#(
  parameter int unsigned W         = ADC_W,
  parameter logic        EOC_DONE  = 1'b1,
  parameter logic        CHANNEL_A = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         eoc,
  output logic         ale,
  output logic         start,
  output logic         oe,
  output logic         adda,
  output logic         lock,
  output logic [W-1:0] q
);
  adc_state_t state, state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      ADC_IDLE:  state_nx = ADC_START;
      ADC_START: state_nx = ADC_WAIT;
      ADC_WAIT:  if (eoc == EOC_DONE) state_nx = ADC_OE;
      ADC_OE:    state_nx = ADC_LOCK;
      ADC_LOCK:  state_nx = ADC_IDLE;
      default:   state_nx = ADC_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ADC_IDLE;
      q     <= '0;
    end else begin
      state <= state_nx;
      if (state == ADC_OE) q <= d;   // the edge that enters LOCK
    end
  end

  assign start = (state == ADC_START);
  assign ale   = (state == ADC_START);
  assign oe    = (state == ADC_OE) || (state == ADC_LOCK);
  assign lock  = (state == ADC_LOCK);
  assign adda  = CHANNEL_A;
endmodule
