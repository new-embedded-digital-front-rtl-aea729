// adc_ctrl: ADC controller of the acquisition core.
//
// The four Anger channels (x+, x-, y+, y-) arrive as 10-bit parallel words,
// one bus per channel. The controller produces the ADC conversion strobe
// `adc_clk_en` once every (div+1) cycles of the 62.5 MHz acquisition clock,
// registers the pins every cycle (input flops) and latches the four channels
// when the strobe fires, presenting them with `valid` high for one cycle.
// Latency from pins to `sample`: two clocks. The published design names the
// block and gives the 10-bit channels and the 65 MHz maximum rate; the
// programmable divider and the pin timing are this design's own choice.
module adc_ctrl
  import pet_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  div,          // sample period minus one, in clocks
  input  adc_sample_t adc_in,       // ADC output pins
  output logic        adc_clk_en,   // conversion strobe
  output adc_sample_t sample,
  output logic        valid
);
  adc_sample_t pins_q;
  logic [3:0]  cnt;

  assign adc_clk_en = (cnt == div);

  always_ff @(posedge clk) begin
    pins_q <= adc_in;
    if (rst) begin
      cnt    <= '0;
      valid  <= 1'b0;
      sample <= '0;
    end else begin
      valid <= adc_clk_en;
      if (adc_clk_en) begin
        cnt    <= '0;
        sample <= pins_q;
      end else begin
        cnt <= cnt + 4'd1;
      end
    end
  end
endmodule
