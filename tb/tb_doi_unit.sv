// tb_doi_unit: random windows and tail starts; the tail integral (energy of
// the samples at window positions >= doi_start) must match a sum kept here,
// saturating at 16 bits, with `done` one clock after gate_last.
`timescale 1ns/1ps
module tb_doi_unit;
  import pet_pkg::*;
  logic clk = 0, rst = 1;
  always #8 clk = ~clk;
  logic gate, gate_last, done;
  logic [EN_W-1:0] ex, ey;
  logic [7:0] doi_start;
  logic [DOI_W-1:0] doi;
  doi_unit dut (.clk, .rst, .gate, .gate_last, .ex, .ey, .doi_start, .doi, .done);

  int checks = 0, failures = 0, saturated = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    gate = 0; gate_last = 0; ex = 0; ey = 0; doi_start = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int w = 0; w < 60; w++) begin
      automatic int len = $urandom_range(1, 64), tail = 0, exp;
      automatic int amp = (w % 4 == 3) ? 2046 : 300;
      doi_start = 8'($urandom_range(0, len + 2));
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin gate = 0; gate_last = 0; @(negedge clk); end
        gate = 1; gate_last = (k == len - 1);
        ex = EN_W'($urandom_range(0, amp)); ey = EN_W'($urandom_range(0, amp));
        if (k >= doi_start) tail += int'(ex) + int'(ey);
        @(posedge clk); #1;
        check(done == (k == len - 1), "done timing");
      end
      @(negedge clk) begin gate = 0; gate_last = 0; end
      exp = (tail > 65535) ? 65535 : tail;
      if (tail > 65535) saturated++;
      check(int'(doi) == exp, $sformatf("tail %0d exp %0d (len %0d start %0d)", doi, exp, len, doi_start));
    end
    check(saturated > 0, "saturation exercised");
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
