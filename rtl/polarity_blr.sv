// polarity_blr: polarity normalisation and baseline restoration.
//
// For each of the four channels the raw code is first inverted when the
// channel's polarity bit is set (c' = 1023 - c), so every pulse rises above
// its baseline. The baseline is tracked by a first-order recursive average
// held with 8 fraction bits, b += (s - b) / 2^shift. The update with a sample
// is made one clock after the sample, in the cycle where its energy is on the
// outputs and the detector has judged it: `freeze` from the detector in that
// cycle (high from the sample that triggers to the end of the pulse) keeps
// the pulse out of the baseline. The first sample after reset loads the
// baseline directly. The corrected value s - b is clipped at zero and the
// Anger combinations are formed: x = x+ - x-, y = y+ - y-, Ex = x+ + x-,
// Ey = y+ + y-, and the instantaneous energy E = Ex + Ey.
// Timing: outputs are registered, one clock after `valid_in`.
// The published design gives the purpose (positive pulses on a zero
// baseline); the averaging filter, its freeze and the clipping are this
// design's own choice.
module polarity_blr
  import pet_pkg::*;
#(
  parameter int unsigned FRAC = 8         // fraction bits of the baseline
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              valid_in,
  input  adc_sample_t       sample,
  input  logic [3:0]        polarity,     // bit 0 = xp ... bit 3 = yn
  input  logic [3:0]        blr_shift,    // filter constant, 0..FRAC
  input  logic              freeze,
  output logic              valid_out,
  output anger_t            anger,
  output logic [ETOT_W-1:0] energy
);
  localparam int unsigned BW = ADC_W + FRAC;

  logic [ADC_W-1:0] raw [4];
  logic [ADC_W-1:0] s   [4];
  logic [BW-1:0]    bl  [4];
  logic [ADC_W-1:0] cor [4];
  logic [ADC_W-1:0] s_q [4];               // sample awaiting its update
  logic             primed;

  assign raw[0] = sample.xp;
  assign raw[1] = sample.xn;
  assign raw[2] = sample.yp;
  assign raw[3] = sample.yn;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic signed [ADC_W+1:0] diff;
      s[c]   = polarity[c] ? ~raw[c] : raw[c];
      diff   = $signed({2'b00, s[c]}) - $signed({2'b00, bl[c][BW-1:FRAC]});
      cor[c] = diff[ADC_W+1] ? '0 : diff[ADC_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      primed    <= 1'b0;
      valid_out <= 1'b0;
      anger     <= '0;
      energy    <= '0;
      for (int c = 0; c < 4; c++) begin
        bl[c]  <= '0;
        s_q[c] <= '0;
      end
    end else begin
      valid_out <= valid_in;
      // Baseline update with the sample now on the outputs.
      if (valid_out && !freeze) begin
        for (int c = 0; c < 4; c++) begin
          logic signed [BW+1:0] err;
          err = $signed({2'b00, s_q[c], {FRAC{1'b0}}}) - $signed({2'b00, bl[c]});
          bl[c] <= BW'($signed({2'b00, bl[c]}) + (err >>> blr_shift));
        end
      end
      if (valid_in) begin
        primed <= 1'b1;
        for (int c = 0; c < 4; c++) begin
          s_q[c] <= s[c];
          if (!primed) bl[c] <= {s[c], {FRAC{1'b0}}};
        end
        // Before the baseline is primed the corrected value is meaningless.
        anger.x <= primed ? $signed({1'b0, cor[0]}) - $signed({1'b0, cor[1]}) : '0;
        anger.y <= primed ? $signed({1'b0, cor[2]}) - $signed({1'b0, cor[3]}) : '0;
        anger.ex <= primed ? EN_W'(cor[0]) + EN_W'(cor[1]) : '0;
        anger.ey <= primed ? EN_W'(cor[2]) + EN_W'(cor[3]) : '0;
        energy   <= primed ? ETOT_W'(cor[0]) + ETOT_W'(cor[1])
                           + ETOT_W'(cor[2]) + ETOT_W'(cor[3]) : '0;
      end
    end
  end
endmodule
