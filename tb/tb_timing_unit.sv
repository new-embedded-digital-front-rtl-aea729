// tb_timing_unit: the time counter restarts on sync_start and the timestamp
// of a trigger holds the counter value of the previous sample and the
// interpolated fraction floor(16 * (thr - E0) / (E1 - E0)), clamped to 15,
// computed here independently for random sample pairs and sample rates.
`timescale 1ns/1ps
module tb_timing_unit;
  import pet_pkg::*;
  logic clk = 0, rst = 1;
  always #8 clk = ~clk;
  logic sync_start, valid, trigger, done;
  logic [ETOT_W-1:0] energy, threshold;
  logic [T_W-1:0] t;
  timing_unit dut (.clk, .rst, .sync_start, .valid, .energy, .threshold, .trigger, .t, .done);

  int checks = 0, failures = 0;
  int cyc;                                  // clocks since sync_start
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    sync_start = 0; valid = 0; trigger = 0; energy = 0; threshold = 500;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (7) @(negedge clk);
    sync_start = 1;
    @(posedge clk) cyc = 0;                  // counter is 0 after this edge
    @(negedge clk) sync_start = 0;
    for (int n = 0; n < 200; n++) begin
      automatic int gap = $urandom_range(0, 3), e0, e1, f, prev_cyc;
      threshold = ETOT_W'($urandom_range(50, 3000));
      e0 = $urandom_range(0, threshold - 1);
      e1 = $urandom_range(threshold, 4095);
      // sample E0
      repeat (gap) begin @(posedge clk) cyc++; @(negedge clk); end
      valid = 1; energy = ETOT_W'(e0); prev_cyc = cyc;
      @(posedge clk) cyc++;
      @(negedge clk) valid = 0;
      repeat (gap) begin @(posedge clk) cyc++; @(negedge clk); end
      // sample E1 triggers
      valid = 1; trigger = 1; energy = ETOT_W'(e1);
      f = 16 * (threshold - e0) / (e1 - e0);
      if (f > 15) f = 15;
      @(posedge clk) cyc++;
      @(negedge clk) begin valid = 0; trigger = 0; end
      check(done, "done one clock after trigger");
      check(int'(t[3:0]) == f, $sformatf("fraction %0d exp %0d (thr %0d e0 %0d e1 %0d)", t[3:0], f, threshold, e0, e1));
      check(int'(t[31:4]) == prev_cyc, $sformatf("coarse %0d exp %0d", int'(t[31:4]), prev_cyc));
    end
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
