// adc0809_model: behavioural model of the digital pins of an ADC0809
// converter, for simulation only (not synthesizable as a whole; it stands for
// the external chip).
//
// The analog input is represented by the byte vin. On a clock edge with start
// high the model samples vin, drops eoc and begins a conversion that lasts
// conv_clks clocks; then it raises eoc and holds the result. The result is
// driven on d only while oe is high (the real pin is three-state; here the
// bus reads 0 when not enabled). After reset eoc is high and the result is 0.
// ale and adda are accepted but only one channel is modelled.
module adc0809_model (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] vin,
  input  logic [7:0] conv_clks,   // at least 1
  input  logic       start,
  input  logic       ale,
  input  logic       adda,
  input  logic       oe,
  output logic       eoc,
  output logic [7:0] d,
  output int         conversions
);
  logic [7:0] sample, result, cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eoc         <= 1'b1;
      sample      <= '0;
      result      <= '0;
      cnt         <= '0;
      conversions <= 0;
    end else if (start) begin
      eoc    <= 1'b0;
      sample <= vin;
      cnt    <= conv_clks - 8'd1;
    end else if (!eoc) begin
      if (cnt == 0) begin
        eoc         <= 1'b1;
        result      <= sample;
        conversions <= conversions + 1;
      end else begin
        cnt <= cnt - 8'd1;
      end
    end
  end

  assign d = oe ? result : 8'h00;

  wire unused = ale ^ adda;
endmodule
