// tb_pulse_detect: the detection state machine against a reference model.
// Random energy traces with pulses of random height and length, and idle
// gaps between samples, are run through the detector for several windows;
// trigger, gate, gate_last and busy are compared sample by sample with a
// model kept here, and the number of gate samples per trigger is checked.
`timescale 1ns/1ps
module tb_pulse_detect;
  import pet_pkg::*;
  logic clk = 0, rst = 1;
  always #8 clk = ~clk;
  logic en, valid, trigger, gate, gate_last, busy;
  logic [ETOT_W-1:0] energy, threshold;
  logic [7:0] window;
  pulse_detect dut (.clk, .rst, .en, .valid, .energy, .threshold, .window,
                    .trigger, .gate, .gate_last, .busy);

  int checks = 0, failures = 0, triggers = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: 0 = waiting for E < thr, 1 = armed, 2 = in gate.
  int mstate, mleft;

  task automatic step(int e, bit v);
    bit et, eg, el;
    @(negedge clk);
    valid = v; energy = ETOT_W'(e);
    et = 0; eg = 0; el = 0;
    if (v) begin
      if (mstate == 1 && e >= threshold) begin
        et = 1; eg = 1; mleft = (window == 0) ? 1 : window;
      end else if (mstate == 2) eg = 1;
      if (eg) el = (mleft == 1);
    end
    #1;

    check(trigger == et && gate == eg && gate_last == el,
          $sformatf("e=%0d v=%0d got t/g/l %b%b%b exp %b%b%b", e, v, trigger, gate, gate_last, et, eg, el));
    check(busy == (mstate != 1 || et), "busy");
    if (et) triggers++;
    @(posedge clk);
    if (v) begin
      if (eg) begin mleft--; mstate = (mleft == 0) ? 0 : 2; end
      else if (mstate == 0 && e < threshold) mstate = 1;
    end
  endtask

  int wins [4] = '{0, 1, 5, 20};
  initial begin
    en = 0; valid = 0; energy = 0; threshold = 300; window = 5;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0; en = 1;
    foreach (wins[w]) begin
      window = 8'(wins[w]);
      mstate = 0;
      @(negedge clk) begin en = 0; valid = 0; end
      @(negedge clk) en = 1;
      for (int p = 0; p < 40; p++) begin
        automatic int h = $urandom_range(100, 900), len = $urandom_range(1, 30);
        for (int k = 0; k < len; k++) step(h - h * k / len, $urandom_range(0, 3) != 0);
        for (int k = 0; k < $urandom_range(0, 6); k++) step($urandom_range(0, 250), 1);
      end
    end
    check(triggers > 50, $sformatf("triggers %0d", triggers));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
