// tb_polarity_blr: baseline restoration and polarity handling.
// Channels sit on different baselines, two of them with inverted polarity.
// After settling the outputs must be zero; pulses applied with `freeze` high
// must come out exactly as amplitude differences combined into x, y, Ex, Ey
// and E; a baseline step with `freeze` low must be tracked back to zero and
// with `freeze` high must not move the baseline.
`timescale 1ns/1ps
module tb_polarity_blr;
  import pet_pkg::*;
  logic clk = 0, rst = 1;
  always #8 clk = ~clk;
  logic        valid_in, freeze, valid_out;
  adc_sample_t sample;
  logic [3:0]  polarity, blr_shift;
  anger_t      anger;
  logic [ETOT_W-1:0] energy;
  polarity_blr dut (.clk, .rst, .valid_in, .sample, .polarity, .blr_shift,
                    .freeze, .valid_out, .anger, .energy);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int base [4] = '{120, 340, 80, 500};   // baseline seen after polarity
  // Drive one sample with amplitudes a[] above the baselines.
  task automatic drive(int a0, int a1, int a2, int a3, bit frz);
    int a [4] = '{a0, a1, a2, a3};
    int v [4];
    for (int c = 0; c < 4; c++) begin
      v[c] = base[c] + a[c];
      if (polarity[c]) v[c] = 1023 - v[c];
    end
    @(negedge clk);
    valid_in = 1; freeze = frz;
    sample = '{xp: ADC_W'(v[0]), xn: ADC_W'(v[1]), yp: ADC_W'(v[2]), yn: ADC_W'(v[3])};
    @(posedge clk); #1;
  endtask

  task automatic expect_out(int a0, int a1, int a2, int a3, string what);
    check(valid_out, {what, " valid"});
    check(int'(anger.x) == a0 - a1 && int'(anger.y) == a2 - a3, $sformatf("%s x/y %0d/%0d", what, int'(anger.x), int'(anger.y)));
    check(int'(anger.ex) == a0 + a1 && int'(anger.ey) == a2 + a3, $sformatf("%s Ex/Ey %0d/%0d", what, anger.ex, anger.ey));
    check(int'(energy) == a0 + a1 + a2 + a3, $sformatf("%s E %0d", what, energy));
  endtask

  initial begin
    valid_in = 0; freeze = 0; sample = '0; polarity = 4'b1010; blr_shift = 4'd3;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 20; i++) drive(0, 0, 0, 0, 0);
    expect_out(0, 0, 0, 0, "settled");
    // Pulses with the baseline frozen.
    for (int i = 0; i < 20; i++) begin
      automatic int a0 = $urandom_range(0, 400), a1 = $urandom_range(0, 400);
      automatic int a2 = $urandom_range(0, 400), a3 = $urandom_range(0, 400);
      drive(a0, a1, a2, a3, 1);
      expect_out(a0, a1, a2, a3, "pulse");
    end
    // A few pulse samples must not have moved the baseline.
    drive(0, 0, 0, 0, 1);
    expect_out(0, 0, 0, 0, "after pulse");
    // Sample below the baseline is clipped at zero.
    base[0] -= 30;
    drive(0, 0, 0, 0, 1);
    expect_out(0, 0, 0, 0, "clipped");
    // Baseline step of +40 on yp, frozen: stays at 40.
    base[0] += 30;
    base[2] += 40;
    for (int i = 0; i < 10; i++) drive(0, 0, 0, 0, 1);
    drive(0, 0, 0, 0, 1);
    expect_out(0, 0, 40, 0, "frozen step");
    // Tracking: with the filter running the step decays to zero.
    for (int i = 0; i < 200; i++) drive(0, 0, 0, 0, 0);
    check(energy <= 1, $sformatf("tracked step, E=%0d", energy));
    // Decay after k samples follows (1 - 2^-3)^k: after 8 samples about 14.
    base[2] += 40;
    drive(0, 0, 0, 0, 0);
    check(energy >= 39 && energy <= 41, $sformatf("first sample of step %0d", energy));
    for (int i = 0; i < 8; i++) drive(0, 0, 0, 0, 0);
    check(energy >= 12 && energy <= 17, $sformatf("decay after 8 samples %0d", energy));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
