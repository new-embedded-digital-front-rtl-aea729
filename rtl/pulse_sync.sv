// pulse_sync: carries single-cycle pulses between unrelated clocks.
// Each source pulse flips a toggle flop; the destination synchronises the
// toggle with two flops and emits one pulse per observed edge, three to four
// destination clocks later. Source pulses must be at least three destination
// clocks apart, which the event rate of the acquisition core guarantees.
module pulse_sync (
  input  logic clk_src,
  input  logic rst_src,
  input  logic pulse_src,
  input  logic clk_dst,
  input  logic rst_dst,
  output logic pulse_dst
);
  logic tog, s1, s2, s3;
  always_ff @(posedge clk_src) begin
    if (rst_src)        tog <= 1'b0;
    else if (pulse_src) tog <= ~tog;
  end
  always_ff @(posedge clk_dst) begin
    if (rst_dst) {s1, s2, s3} <= '0;
    else         {s1, s2, s3} <= {tog, s1, s2};
  end
  assign pulse_dst = s2 ^ s3;
endmodule
