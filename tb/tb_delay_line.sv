// tb_delay_line: random samples with random gaps in `valid`; for every delay
// d the output must equal the sample written d valid samples earlier (zero
// before that many samples exist).
`timescale 1ns/1ps
module tb_delay_line;
  import pet_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst = 1;
  always #8 clk = ~clk;
  logic valid;
  anger_t din, dout, hist [$];
  logic [3:0] d;
  delay_line #(.DEPTH(DEPTH)) dut (.clk, .rst, .valid, .din, .d, .dout);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    valid = 0; din = '0; d = 0;
    repeat (2) @(posedge clk);
    for (int dd = 0; dd < DEPTH; dd += (dd < 3 ? 1 : 4)) begin
      anger_t exp;
      @(negedge clk); rst = 1; valid = 0; hist.delete();
      @(negedge clk); rst = 0; d = 4'(dd);
      for (int n = 0; n < 60; n++) begin
        @(negedge clk);
        valid = ($urandom_range(0, 3) != 0);
        din   = anger_t'({$urandom, $urandom});
        if (valid) hist.push_back(din);
        #1;
        if (valid) begin
          exp = (hist.size() > dd) ? hist[hist.size() - 1 - dd] : '0;
          check(dout == exp, $sformatf("d=%0d sample %0d", dd, hist.size()));
        end
      end
    end
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
