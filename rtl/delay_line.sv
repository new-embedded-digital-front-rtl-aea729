// delay_line: the Z^-d stage between the baseline restorer and the
// integrators.
//
// A circular buffer of DEPTH samples of (x, y, Ex, Ey) written on every valid
// sample. The output is the sample taken d valid samples before the current
// one (d = 0 passes the current sample through), read combinationally so it
// is aligned with the current sample and with the detector's gate. Delaying
// the data lets the gate, opened when the threshold is crossed, integrate the
// d samples of the rising edge that came before the crossing. The buffer is
// cleared at reset. The published design shows the Z^-d stage; its depth is
// this design's own choice.
module delay_line
  import pet_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     valid,
  input  anger_t                   din,
  input  logic [$clog2(DEPTH)-1:0] d,
  output anger_t                   dout
);
  localparam int unsigned AW = $clog2(DEPTH);
  anger_t          mem [DEPTH];
  logic [AW-1:0]   wp, ra;

  assign ra   = wp - d;                      // wraps around the buffer
  assign dout = (d == '0) ? din : mem[ra];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (valid) begin
      mem[wp] <= din;
      wp      <= wp + 1'b1;
    end
  end
endmodule
