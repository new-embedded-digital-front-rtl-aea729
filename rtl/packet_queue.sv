// packet_queue: event queue between the acquisition and bus clock domains.
//
// An asynchronous FIFO of DEPTH event packets. The write side runs on the
// 62.5 MHz acquisition clock, the read side on the 50 MHz bus clock; the
// read and write pointers cross as Gray codes through two-flop synchronisers,
// so `full` and `empty` are conservative. A push while full drops the packet
// and pulses `lost` (the statistics count these as lost events). `rdata` is
// the head packet, valid while `empty` is low; `pop` removes it.
// DEPTH must be a power of two. Both resets must be applied together.
// The published design gives the queue and its place between the two clock
// domains; its depth and the Gray-pointer construction are this design's own.
module packet_queue #(
  parameter int unsigned W     = 120,
  parameter int unsigned DEPTH = 16
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         push,
  input  logic [W-1:0] wdata,
  output logic         full,
  output logic         lost,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w, wgray_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write side.
  logic [AW:0] wbin_n;
  assign wbin_n = wbin + 1'b1;
  assign full   = (wgray == {~rgray_w[AW:AW-1], rgray_w[AW-2:0]});
  assign lost   = push && full;

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (push && !full) begin
      mem[wbin[AW-1:0]] <= wdata;
      wbin  <= wbin_n;
      wgray <= bin2gray(wbin_n);
    end
  end

  cdc_sync #(.W(AW + 1)) u_r2w (.clk(wclk), .d(rgray), .q(rgray_w));

  // Read side.
  logic [AW:0] rbin_n;
  assign rbin_n = rbin + 1'b1;
  assign empty  = (rgray == wgray_r);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (pop && !empty) begin
      rbin  <= rbin_n;
      rgray <= bin2gray(rbin_n);
    end
  end

  cdc_sync #(.W(AW + 1)) u_w2r (.clk(rclk), .d(wgray), .q(wgray_r));

  initial assert (DEPTH >= 4 && (1 << AW) == DEPTH)
    else $error("packet_queue: DEPTH must be a power of two >= 4");
endmodule
