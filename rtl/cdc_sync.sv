// cdc_sync: two-flop synchroniser for a level or a quasi-static bus.
// Each bit is sampled twice in the destination clock; a bus must be held
// stable while the destination may use it (the acquisition settings are
// meant to be changed only while acquisition is disabled). Latency 2 clocks.
module cdc_sync #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end
endmodule
