// tb_adc_ctrl: checks the ADC strobe period for several dividers and that
// each latched sample equals the pin values one clock before the strobe.
`timescale 1ns/1ps
module tb_adc_ctrl;
  import pet_pkg::*;
  logic clk = 0, rst = 1;
  always #8 clk = ~clk;
  logic [3:0]  div;
  adc_sample_t adc_in, sample, pins_hist [$];
  logic        adc_clk_en, valid;
  adc_ctrl dut (.clk, .rst, .div, .adc_in, .adc_clk_en, .sample, .valid);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    adc_in = '0; div = 0;
    repeat (3) @(posedge clk);
    foreach (div_list[i]) run(div_list[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int div_list [4] = '{0, 1, 3, 9};

  task automatic run(int d);
    adc_sample_t prev_pins, cur_pins, exp;
    int n_valid = 0, last_valid = -1;
    bit strobe_prev = 0;
    @(negedge clk); rst = 1; div = 4'(d);
    @(negedge clk); rst = 0;
    cur_pins = '0;
    for (int c = 0; c < 200; c++) begin
      prev_pins = cur_pins;
      cur_pins = adc_sample_t'({$urandom, $urandom});
      adc_in = cur_pins;                        // applied at negedge c
      @(posedge clk);
      strobe_prev = adc_clk_en;
      if (strobe_prev) exp = prev_pins;         // pins_q held the previous pins
      #1;
      if (valid) begin
        n_valid++;
        if (last_valid >= 0) check(c - last_valid == d + 1, $sformatf("period %0d div %0d", c - last_valid, d));
        last_valid = c;
        check(sample == exp, "latched sample");
      end
      @(negedge clk);
    end
    check(n_valid >= 200 / (d + 1) - 1 && n_valid <= 200 / (d + 1) + 1, $sformatf("rate %0d div %0d", n_valid, d));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
