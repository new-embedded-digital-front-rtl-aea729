// tb_core_interface: the OPB side of the core on its own. A model queue
// feeds random packets; an OPB master model checks register reset values
// and read-back, the settings bus, the packing of 15-byte packets into the
// two buffer halves (big-endian, back to back), the interrupt and its
// release, the clamp of IRQ_PKTS to what a half holds, the stall while both
// halves are full, the flush of a part-filled half, the event counters and
// the OPB acknowledge rules (one-cycle ack, zero data bus otherwise, no ack
// outside the window).
`timescale 1ns/1ps
module tb_core_interface;
  import pet_pkg::*;
  localparam logic [31:0] BASE = 32'h8000_0000;
  localparam int BUF = 2048, HALF = 1024, MAXP = HALF / 15;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;

  logic opb_select, opb_rnw, sl_xferack, q_empty, q_pop, single_evt, lost_evt, irq;
  logic [31:0] opb_abus, opb_dbus, sl_dbus;
  logic [PKT_W-1:0] q_rdata;
  acq_cfg_t cfg;
  core_interface #(.C_BASEADDR(BASE), .BUF_BYTES(BUF)) dut (
    .clk, .rst, .opb_select, .opb_rnw, .opb_abus, .opb_dbus, .opb_be(4'hF),
    .sl_dbus, .sl_xferack, .cfg, .q_empty, .q_rdata, .q_pop, .single_evt,
    .lost_evt, .irq);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model queue
  logic [PKT_W-1:0] fq [$], sent [$];
  always @(posedge clk) if (q_pop) sent.push_back(fq.pop_front());
  always @(negedge clk) begin
    q_empty = (fq.size() == 0);
    q_rdata = (fq.size() != 0) ? fq[0] : '0;
  end
  task automatic add_pkts(int n);
    repeat (n) fq.push_back({$urandom, $urandom, $urandom, $urandom});
  endtask

  // bus monitor: ack lasts one cycle, data bus is zero without ack
  always @(posedge clk) if (!rst) begin
    if (!sl_xferack && sl_dbus != 0) begin failures++; $display("FAIL: data bus not zero"); end
  end

  task automatic opb_wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); opb_select = 1; opb_rnw = 0; opb_abus = a; opb_dbus = d;
    do @(posedge clk); while (!sl_xferack);
    @(negedge clk); opb_select = 0; opb_dbus = 0;
    check(!sl_xferack, "ack lasts one cycle");
  endtask
  task automatic opb_rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); opb_select = 1; opb_rnw = 1; opb_abus = a;
    do @(posedge clk); while (!sl_xferack);
    d = sl_dbus;
    @(negedge clk); opb_select = 0;
  endtask

  // Read half h holding n packets and compare with the next n sent packets.
  task automatic read_half(int h, int n);
    logic [31:0] w;
    logic [7:0] bytes [HALF];
    for (int i = 0; i < (n * 15 + 3) / 4; i++) begin
      opb_rd(BASE + BUF + h * HALF + 4 * i, w);
      for (int b = 0; b < 4; b++) bytes[4 * i + b] = w[31 - 8 * b -: 8];
    end
    for (int p = 0; p < n; p++) begin
      logic [PKT_W-1:0] got, exp;
      for (int b = 0; b < 15; b++) got[PKT_W - 1 - 8 * b -: 8] = bytes[15 * p + b];
      exp = (sent.size() != 0) ? sent.pop_front() : '0;
      check(got == exp, $sformatf("half %0d packet %0d", h, p));
    end
  endtask

  logic [31:0] r;
  initial begin
    opb_select = 0; opb_rnw = 1; opb_abus = 0; opb_dbus = 0; single_evt = 0; lost_evt = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // reset values
    opb_rd(BASE + 32'h00, r); check(r == 32'h20, "CTRL reset");
    opb_rd(BASE + 32'h04, r); check(r == 200, "THRESH reset");
    opb_rd(BASE + 32'h08, r); check(r == 32'h0002_0810, "WINDOW reset");
    opb_rd(BASE + 32'h10, r); check(r == MAXP, "IRQ_PKTS reset");
    check(!irq, "no irq after reset");

    // settings
    opb_wr(BASE + 32'h00, 32'h2B);            // enable, polarity 0101, irq on
    opb_wr(BASE + 32'h04, 12'd777);
    opb_wr(BASE + 32'h08, 32'h0005_0C20);
    opb_wr(BASE + 32'h0C, 32'h0000_0306);
    opb_rd(BASE + 32'h00, r); check(r == 32'h2B, "CTRL read back");
    opb_rd(BASE + 32'h0C, r); check(r == 32'h306, "ACQ read back");
    check(cfg.enable && cfg.polarity == 4'b0101 && cfg.threshold == 777, "cfg ctrl/thresh");
    check(cfg.window == 8'h20 && cfg.doi_start == 8'h0C && cfg.delay == 4'd5, "cfg window");
    check(cfg.blr_shift == 4'd6 && cfg.adc_div == 4'd3, "cfg acq");

    // outside the window: no ack
    @(negedge clk); opb_select = 1; opb_rnw = 1; opb_abus = BASE + 32'h2000;
    repeat (4) begin @(posedge clk); check(!sl_xferack, "no ack outside window"); end
    @(negedge clk) opb_select = 0;

    // three packets per half
    opb_wr(BASE + 32'h10, 3);
    add_pkts(3);
    repeat (60) @(posedge clk);
    check(irq, "irq after 3 packets");
    opb_rd(BASE + 32'h14, r);
    check(r[1:0] == 2'b01 && r[2] == 1 && r[23:16] == 3, $sformatf("STATUS %h", r));
    read_half(0, 3);
    opb_wr(BASE + 32'h14, 1);
    check(!irq, "irq released");
    add_pkts(3);
    repeat (60) @(posedge clk);
    opb_rd(BASE + 32'h14, r);
    check(r[1:0] == 2'b10 && r[2] == 0 && r[31:24] == 3, $sformatf("STATUS half1 %h", r));
    read_half(1, 3);
    opb_wr(BASE + 32'h14, 2);

    // both halves full: draining stops, queue keeps the rest
    add_pkts(9);
    repeat (200) @(posedge clk);
    check(fq.size() == 3, $sformatf("stalled with %0d left", fq.size()));
    opb_rd(BASE + 32'h14, r);
    check(r[1:0] == 2'b11, "both halves full");
    read_half(0, 3); opb_wr(BASE + 32'h14, 1);
    read_half(1, 3); opb_wr(BASE + 32'h14, 2);
    repeat (60) @(posedge clk);
    check(fq.size() == 0, "drained after release");
    opb_rd(BASE + 32'h14, r);
    check(r[1:0] == 2'b01, "third group in half 0");
    read_half(0, 3); opb_wr(BASE + 32'h14, 1);

    // flush of a part-filled half (half 1 now)
    add_pkts(2);
    repeat (60) @(posedge clk);
    check(!irq, "no irq before flush");
    opb_wr(BASE + 32'h00, 32'h12B);
    repeat (4) @(posedge clk);
    check(irq, "irq after flush");
    opb_rd(BASE + 32'h14, r);
    check(r[1:0] == 2'b10 && r[31:24] == 2, $sformatf("flushed STATUS %h", r));
    read_half(1, 2); opb_wr(BASE + 32'h14, 2);
    opb_wr(BASE + 32'h00, 32'h12B);           // flush of an empty half: nothing
    repeat (4) @(posedge clk);
    check(!irq, "empty flush raises nothing");

    // IRQ_PKTS beyond a half is clamped to MAXP packets
    opb_wr(BASE + 32'h10, 250);
    add_pkts(MAXP + 1);
    repeat (20 * MAXP) @(posedge clk);
    opb_rd(BASE + 32'h14, r);
    check(r[0] == 1 && r[23:16] == MAXP && r[31:24] == 1, $sformatf("clamped STATUS %h", r));
    read_half(0, MAXP); opb_wr(BASE + 32'h14, 1);

    // event counters
    for (int i = 0; i < 7; i++) begin
      @(negedge clk) single_evt = 1; lost_evt = (i < 2);
      @(negedge clk) begin single_evt = 0; lost_evt = 0; end
    end
    opb_rd(BASE + 32'h18, r); check(r == 7, "SINGLES");
    opb_rd(BASE + 32'h1C, r); check(r == 2, "LOST");
    opb_wr(BASE + 32'h18, 0);
    opb_rd(BASE + 32'h18, r); check(r == 0, "SINGLES cleared");

    // interrupt enable off masks the line
    opb_wr(BASE + 32'h00, 32'h0B);
    opb_wr(BASE + 32'h00, 32'h10B);           // flush the one packet in half 1
    repeat (4) @(posedge clk);
    opb_rd(BASE + 32'h14, r);
    check(r[1] == 1 && !irq, "irq masked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
