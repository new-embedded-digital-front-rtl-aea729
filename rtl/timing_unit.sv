// timing_unit: event timestamp.
//
// A free-running time counter advances on every 62.5 MHz clock and restarts
// at zero on `sync_start`, the synchronisation pulse the master controller
// sends to all modules so that their counters agree. Each valid sample
// remembers the counter value and the energy of the previous sample. When the
// detector triggers, the crossing of the threshold lies between the previous
// sample (E0 < threshold) and the current one (E1 >= threshold); linear
// interpolation gives the fraction f = (threshold - E0) / (E1 - E0) of a
// sample period, computed to FINE_W bits by an unrolled restoring division
// and clamped below 1. The timestamp is
//   t = { counter at the previous sample [T_W-FINE_W-1:0], f }
// i.e. the crossing lies f * (adc_div + 1) clocks after the counter value.
// `t` is registered and `done` pulses one clock after `trigger`.
// The published design gives a time counter shared through a synchronisation
// start and asks for a timestamp; the interpolation is this design's choice.
module timing_unit
  import pet_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              sync_start,
  input  logic              valid,
  input  logic [ETOT_W-1:0] energy,
  input  logic [ETOT_W-1:0] threshold,
  input  logic              trigger,
  output logic [T_W-1:0]    t,
  output logic              done
);
  localparam int unsigned CW = T_W - FINE_W;
  logic [CW-1:0]     counter, cnt_prev;
  logic [ETOT_W-1:0] e_prev;
  logic [FINE_W-1:0] frac;

  // frac = floor(2^FINE_W * num / den) for 0 < num <= den, clamped.
  always_comb begin
    logic [ETOT_W:0] num, den;
    num  = {1'b0, threshold} - {1'b0, e_prev};
    den  = {1'b0, energy}    - {1'b0, e_prev};
    frac = '0;
    for (int i = FINE_W - 1; i >= 0; i--) begin
      num = num << 1;
      if (num >= den) begin
        num     = num - den;
        frac[i] = 1'b1;
      end
    end
    if (threshold >= energy) frac = '1;   // crossing at the current sample
    if (e_prev >= threshold) frac = '0;   // already above: no crossing to refine
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      counter <= '0; cnt_prev <= '0; e_prev <= '0; t <= '0; done <= 1'b0;
    end else begin
      counter <= sync_start ? '0 : counter + 1'b1;
      done    <= trigger;
      if (trigger) t <= {cnt_prev, frac};
      if (valid) begin
        cnt_prev <= counter;
        e_prev   <= energy;
      end
    end
  end
endmodule
