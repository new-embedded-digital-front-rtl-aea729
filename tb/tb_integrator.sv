// tb_integrator: random gate windows of 1..40 samples over random signed and
// unsigned inputs, with idle cycles inside and between windows; the four sums
// must match sums kept here, appear one clock after gate_last with `done`,
// and not be disturbed by samples outside the gate.
`timescale 1ns/1ps
module tb_integrator;
  import pet_pkg::*;
  logic clk = 0, rst = 1;
  always #8 clk = ~clk;
  logic gate, gate_last, done;
  anger_t din;
  logic signed [INT_W-1:0] ix, iy;
  logic [INT_W-1:0] iex, iey;
  integrator dut (.clk, .rst, .gate, .gate_last, .din, .ix, .iy, .iex, .iey, .done);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(bit g, bit l);
    @(negedge clk);
    gate = g; gate_last = l;
    din.x  = POS_W'($urandom_range(0, 2046) - 1023);
    din.y  = POS_W'($urandom_range(0, 2046) - 1023);
    din.ex = EN_W'($urandom_range(0, 2046));
    din.ey = EN_W'($urandom_range(0, 2046));
  endtask

  initial begin
    gate = 0; gate_last = 0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int w = 0; w < 40; w++) begin
      automatic int len = $urandom_range(1, 40);
      automatic int sx = 0, sy = 0, sex = 0, sey = 0;
      for (int i = 0; i < $urandom_range(0, 3); i++) put(0, 0);
      for (int k = 0; k < len; k++) begin
        while ($urandom_range(0, 4) == 0) put(0, 0);   // no sample this clock
        put(1, k == len - 1);
        sx += int'(din.x); sy += int'(din.y); sex += int'(din.ex); sey += int'(din.ey);
        @(posedge clk); #1;
        check(done == (k == len - 1), "done timing");
      end
      check(int'(ix) == sx && int'(iy) == sy, $sformatf("Ix %0d/%0d Iy %0d/%0d", int'(ix), sx, int'(iy), sy));
      check(int'(iex) == sex && int'(iey) == sey, $sformatf("IEx %0d/%0d", iex, sex));
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
