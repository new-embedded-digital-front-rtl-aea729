// pulse_detect: pulse detection state machine.
//
// Watches the instantaneous energy E = Ex + Ey of each sample. While ARMED,
// the first sample with E >= threshold fires `trigger` and opens the gate:
// `gate` is high on that sample and on the following window-1 samples
// (window 0 counts as 1); `gate_last` marks the last one. After the window
// the machine waits in REARM until E drops below the threshold, so the tail
// of a pulse cannot trigger again, and then returns to ARMED. `trigger`,
// `gate` and `gate_last` are combinational on the current sample so they line
// up with the sample stream; `busy` (gate open or waiting to re-arm) freezes
// the baseline filter; it stays low while disabled so the baseline keeps
// tracking. Clearing `en` returns the machine to REARM at once.
// The published design gives the threshold trigger and the programmable
// number of samples; the re-arm rule and the exact gate alignment are this
// design's own choice.
module pulse_detect
  import pet_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              valid,
  input  logic [ETOT_W-1:0] energy,
  input  logic [ETOT_W-1:0] threshold,
  input  logic [7:0]        window,
  output logic              trigger,
  output logic              gate,
  output logic              gate_last,
  output logic              busy
);
  typedef enum logic [1:0] {ARMED, GATE, REARM} state_e;
  state_e     state;
  logic [7:0] cnt;        // samples already inside the gate
  logic [7:0] win_m1;

  assign win_m1    = (window == 8'd0) ? 8'd0 : window - 8'd1;
  assign trigger   = en && valid && (state == ARMED) && (energy >= threshold);
  assign gate      = trigger || (valid && state == GATE);
  assign gate_last = gate && ((state == GATE) ? (cnt == win_m1) : (win_m1 == 8'd0));
  assign busy      = en && ((state != ARMED) || trigger);

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      state <= REARM;
      cnt   <= '0;
    end else if (valid) begin
      unique case (state)
        ARMED: if (trigger) begin
          state <= gate_last ? REARM : GATE;
          cnt   <= 8'd1;
        end
        GATE: begin
          cnt <= cnt + 8'd1;
          if (gate_last) state <= REARM;
        end
        REARM: if (energy < threshold) state <= ARMED;
        default: state <= REARM;
      endcase
    end
  end
endmodule
