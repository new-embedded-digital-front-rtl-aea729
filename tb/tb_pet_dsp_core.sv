// tb_pet_dsp_core: end-to-end test of the acquisition core at its default
// sizes. A pulse generator drives the four ADC buses with Anger pulses of a
// fixed shape on a constant baseline (the x- channel with inverted polarity),
// while a processor model on the OPB configures the core, waits for the
// interrupt, reads whole buffer halves, unpacks the 15-byte packets and
// compares every field with values computed here from the pulse shape.
// Phases: normal streaming, a flush of a part-filled half, an overload in
// which the processor stops reading so the queue overflows and events are
// counted as lost, and a mode switch to a half-rate ADC with a shorter gate. Each mechanism (interrupt, switch between halves, flush,
// queue overflow, polarity inversion, pre-trigger delay, decay tail, fine
// time) must be seen at least once.
`timescale 1ns/1ps
module tb_pet_dsp_core;
  import pet_pkg::*;

  localparam logic [31:0] BASE = 32'h8000_0000;
  localparam int BUF = 2048, HALF = 1024;
  localparam int B = 100;                 // baseline code of every channel
  localparam int THR = 200, WIN = 16, DLY = 2, DOIS = 8, SPACING = 24;
  localparam int PLEN = 8;
  int P [PLEN] = '{400, 300, 200, 120, 60, 30, 10, 0};

  logic clk_dsp = 0, clk_opb = 0, rst_opb = 1;
  always #8  clk_dsp = ~clk_dsp;   // 62.5 MHz
  always #10 clk_opb = ~clk_opb;   // 50 MHz

  adc_sample_t adc_data;
  logic adc_clk_en, sync_start, single, irq;
  logic opb_select, opb_rnw, sl_xferack;
  logic [31:0] opb_abus, opb_dbus, sl_dbus;

  pet_dsp_core dut (
    .clk_dsp, .clk_opb, .rst_opb, .adc_data, .adc_clk_en, .sync_start, .single,
    .opb_select, .opb_rnw, .opb_abus, .opb_dbus, .opb_be(4'hF), .sl_dbus,
    .sl_xferack, .irq);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- OPB master ----------------
  task automatic opb_wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk_opb);
    opb_select = 1; opb_rnw = 0; opb_abus = a; opb_dbus = d;
    do @(posedge clk_opb); while (!sl_xferack);
    @(negedge clk_opb); opb_select = 0; opb_dbus = 0;
  endtask
  task automatic opb_rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk_opb);
    opb_select = 1; opb_rnw = 1; opb_abus = a;
    do @(posedge clk_opb); while (!sl_xferack);
    d = sl_dbus;
    @(negedge clk_opb); opb_select = 0;
  endtask

  // ---------------- pulse generator and reference ----------------
  int win = WIN, dois = DOIS, div = 0;      // current settings (phase 4 changes them)
  event_t expq[$];
  int     generated = 0;
  int     nonzero_doi = 0, nonzero_fine = 0;

  function automatic event_t expected(int fx, int fy);
    event_t e = '0;
    int ix = 0, iy = 0, iex = 0, iey = 0, doi = 0, e0;
    for (int k = 0; k < PLEN; k++) begin
      int xp = P[k] * fx / 32, xn = P[k] * (16 - fx) / 32;
      int yp = P[k] * fy / 32, yn = P[k] * (16 - fy) / 32;
      if (k + DLY < win) begin
        ix += xp - xn; iy += yp - yn; iex += xp + xn; iey += yp + yn;
      end
      if (k + DLY >= dois && k + DLY < win) doi += xp + xn + yp + yn;
      if (k == 0) e0 = xp + xn + yp + yn;
    end
    e.ix = INT_W'(ix); e.iy = INT_W'(iy); e.iex = INT_W'(iex); e.iey = INT_W'(iey);
    e.doi = DOI_W'(doi);
    e.t[3:0] = (16 * THR / e0 > 15) ? 4'd15 : 4'(16 * THR / e0);
    return e;
  endfunction

  task automatic gen_pulse(int fx, int fy);
    expq.push_back(expected(fx, fy));
    generated++;
    for (int n = 0; n < SPACING; n++) begin
      int a = (n < PLEN) ? P[n] : 0;
      repeat (div + 1) @(negedge clk_dsp);
      adc_data.xp = ADC_W'(B + a * fx / 32);
      adc_data.xn = ADC_W'(1023 - (B + a * (16 - fx) / 32));
      adc_data.yp = ADC_W'(B + a * fy / 32);
      adc_data.yn = ADC_W'(B + a * (16 - fy) / 32);
    end
  endtask

  // ---------------- processor model ----------------
  int  received = 0, irqs = 0, flushes = 0, last_t = -1, t_deltas = 0;
  bit  half_seen [2];
  bit  check_t_delta = 1;

  task automatic service_once();
    logic [31:0] st, w;
    logic [7:0]  bytes [HALF];
    for (int h = 0; h < 2; h++) begin
      opb_rd(BASE + 32'h14, st);
      if (st[h]) begin
        int n = (h == 0) ? int'(st[23:16]) : int'(st[31:24]);
        half_seen[h] = 1;
        for (int wd = 0; wd < (n * PKT_BYTES + 3) / 4; wd++) begin
          opb_rd(BASE + BUF + h * HALF + 4 * wd, w);
          for (int b = 0; b < 4; b++) bytes[4 * wd + b] = w[31 - 8 * b -: 8];
        end
        for (int p = 0; p < n; p++) begin
          logic [PKT_W-1:0] raw;
          event_t got, exp;
          for (int b = 0; b < PKT_BYTES; b++) raw[PKT_W - 1 - 8 * b -: 8] = bytes[p * PKT_BYTES + b];
          got = event_t'(raw);
          received++;
          if (expq.size() == 0) begin check(0, "packet with no pulse"); continue; end
          exp = expq.pop_front();
          check(got.ix == exp.ix && got.iy == exp.iy, $sformatf("Ix/Iy %0d/%0d exp %0d/%0d", int'(got.ix), int'(got.iy), int'(exp.ix), int'(exp.iy)));
          check(got.iex == exp.iex && got.iey == exp.iey, $sformatf("IEx/IEy %0d/%0d exp %0d/%0d", got.iex, got.iey, exp.iex, exp.iey));
          check(got.doi == exp.doi, $sformatf("DOI %0d exp %0d", got.doi, exp.doi));
          check(got.t[3:0] == exp.t[3:0], $sformatf("fine time %0d exp %0d", got.t[3:0], exp.t[3:0]));
          if (got.doi != 0) nonzero_doi++;
          if (got.t[3:0] != 0) nonzero_fine++;
          if (check_t_delta && last_t >= 0) begin
            check(int'(got.t[31:4]) - last_t == SPACING * (div + 1), $sformatf("time step %0d", int'(got.t[31:4]) - last_t));
            t_deltas++;
          end
          last_t = int'(got.t[31:4]);
        end
        opb_wr(BASE + 32'h14, 32'(1 << h));
      end
    end
  endtask

  bit serve = 1, stop = 0;
  initial begin
    opb_select = 0; opb_rnw = 1; opb_abus = 0; opb_dbus = 0;
    wait (!rst_opb);
    forever begin
      @(posedge clk_opb);
      if (stop) break;
      if (serve && irq) begin irqs++; service_once(); end
    end
  end

  // ---------------- main sequence ----------------
  logic [31:0] r;
  int lost_n, singles_n, pending;
  bit half_mode_ok = 0;
  initial begin
    adc_data = '{xp: ADC_W'(B), xn: ADC_W'(1023 - B), yp: ADC_W'(B), yn: ADC_W'(B)};
    sync_start = 0;
    repeat (10) @(posedge clk_opb);
    rst_opb = 0;
    // Configure while serve is idle (no irq yet).
    opb_wr(BASE + 32'h04, THR);
    opb_wr(BASE + 32'h08, (DLY << 16) | (DOIS << 8) | WIN);
    opb_wr(BASE + 32'h0C, 32'h0000_0004);       // shift 4, ADC every clock
    opb_wr(BASE + 32'h10, 4);                   // 4 packets per half
    opb_rd(BASE + 32'h08, r);
    check(r == ((DLY << 16) | (DOIS << 8) | WIN), "WINDOW read back");
    opb_wr(BASE + 32'h00, 32'h1 | (1 << 2) | (1 << 5));
    repeat (300) @(posedge clk_dsp);            // baseline settles
    @(negedge clk_dsp) sync_start = 1;
    @(negedge clk_dsp) sync_start = 0;

    // Phase 1: streaming, 12 pulses at varied positions.
    for (int i = 0; i < 12; i++) gen_pulse(2 + i, 14 - i);
    repeat (400) @(posedge clk_opb);
    check(received == 12 && expq.size() == 0, $sformatf("phase 1 received %0d", received));

    last_t = -1;                                // gap between phases
    // Phase 2: two pulses, then flush the part-filled half.
    gen_pulse(8, 8); gen_pulse(5, 11);
    repeat (200) @(posedge clk_opb);
    check(received == 12, "no interrupt before the half is full");
    opb_rd(BASE + 32'h00, r);
    opb_wr(BASE + 32'h00, r | 32'h100);
    flushes++;
    repeat (400) @(posedge clk_opb);
    check(received == 14, $sformatf("flush delivered %0d", received - 12));

    // Phase 3: overload. The processor stops reading; 2 halves of 4 plus
    // the 16-deep queue hold 24 events, so 6 of 30 are lost.
    serve = 0; check_t_delta = 0;
    for (int i = 0; i < 30; i++) gen_pulse(8, 8);
    repeat (200) @(posedge clk_opb);
    opb_rd(BASE + 32'h1C, r); lost_n = int'(r);
    opb_rd(BASE + 32'h18, r); singles_n = int'(r);
    check(singles_n == generated, $sformatf("SINGLES %0d exp %0d", singles_n, generated));
    check(lost_n == 6, $sformatf("LOST %0d exp 6", lost_n));
    serve = 1;
    repeat (3000) @(posedge clk_opb);
    opb_rd(BASE + 32'h14, r);
    pending = int'(r[23:16]) + int'(r[31:24]);
    if (pending != 0) begin opb_wr(BASE + 32'h00, 32'h1 | (1 << 2) | (1 << 5) | 32'h100); repeat (500) @(posedge clk_opb); end
    check(received + lost_n == generated, $sformatf("received %0d + lost %0d vs %0d", received, lost_n, generated));
    check(expq.size() == lost_n, "left-over references equal lost events");
    expq.delete();

    // Phase 4: mode switch. ADC at half rate, 8-sample window, tail from
    // position 4, delay kept; acquisition disabled while changing settings.
    serve = 1; check_t_delta = 1; last_t = -1;
    begin
      automatic int n_before = received;
      opb_wr(BASE + 32'h00, 32'h0 | (1 << 2) | (1 << 5));
      win = 8; dois = 4; div = 1;
      opb_wr(BASE + 32'h08, (DLY << 16) | (dois << 8) | win);
      opb_wr(BASE + 32'h0C, 32'h0000_0104);
      opb_wr(BASE + 32'h10, 3);
      opb_wr(BASE + 32'h00, 32'h1 | (1 << 2) | (1 << 5));
      repeat (200) @(posedge clk_dsp);
      for (int i = 0; i < 6; i++) gen_pulse(3 + 2 * i, 12 - i);
      repeat (600) @(posedge clk_opb);
      check(received - n_before == 6 && expq.size() == 0, $sformatf("phase 4 received %0d", received - n_before));
      half_mode_ok = (received - n_before == 6);
    end

    // Mechanism coverage.
    $display("coverage: irqs=%0d half0=%0d half1=%0d flushes=%0d lost=%0d doi=%0d fine=%0d tsteps=%0d",
             irqs, half_seen[0], half_seen[1], flushes, lost_n, nonzero_doi, nonzero_fine, t_deltas);
    check(irqs > 0, "interrupt seen");
    check(half_mode_ok, "half-rate ADC mode used");
    check(half_seen[0] && half_seen[1], "both halves used");
    check(flushes > 0, "flush used");
    check(lost_n > 0, "queue overflow seen");
    check(nonzero_doi > 0, "decay tail measured");
    check(nonzero_fine > 0, "fine time seen");
    check(t_deltas > 0, "timestamp steps checked");
    stop = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk_opb);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
