// tb_rate_2mcps: the acquisition core at its default sizes under the
// highest count rate a module is meant to sustain, 2 million events per
// second: a pulse every 31 clocks of 62.5 MHz (2.02 Mcps) for 680 events
// (ten full buffer halves). A processor model services every interrupt by
// reading the full half over the OPB and releasing it. Every event must
// arrive with correct contents, none may be lost, and the events must be
// spaced by exactly 31 clocks in their timestamps.
`timescale 1ns/1ps
module tb_rate_2mcps;
  import pet_pkg::*;

  localparam logic [31:0] BASE = 32'h8000_0000;
  localparam int BUF = 2048, HALF = 1024;
  localparam int B = 100;                 // baseline code of every channel
  localparam int THR = 200, WIN = 16, DLY = 2, DOIS = 8, SPACING = 31;  // 62.5 MHz / 31 = 2.02 Mcps
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
  event_t expq[$];
  int     generated = 0;
  int     nonzero_doi = 0, nonzero_fine = 0;

  function automatic event_t expected(int fx, int fy);
    event_t e = '0;
    int ix = 0, iy = 0, iex = 0, iey = 0, doi = 0, e0;
    for (int k = 0; k < PLEN; k++) begin
      int xp = P[k] * fx / 32, xn = P[k] * (16 - fx) / 32;
      int yp = P[k] * fy / 32, yn = P[k] * (16 - fy) / 32;
      ix += xp - xn; iy += yp - yn; iex += xp + xn; iey += yp + yn;
      if (k + DLY >= DOIS && k + DLY < WIN) doi += xp + xn + yp + yn;
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
      @(negedge clk_dsp);
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
            check(int'(got.t[31:4]) - last_t == SPACING, $sformatf("time step %0d", int'(got.t[31:4]) - last_t));
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
  localparam int N = 680;
  logic [31:0] r;
  realtime t0, t1;
  initial begin
    adc_data = '{xp: ADC_W'(B), xn: ADC_W'(1023 - B), yp: ADC_W'(B), yn: ADC_W'(B)};
    sync_start = 0;
    repeat (10) @(posedge clk_opb);
    rst_opb = 0;
    opb_wr(BASE + 32'h04, THR);
    opb_wr(BASE + 32'h08, (DLY << 16) | (DOIS << 8) | WIN);
    opb_wr(BASE + 32'h0C, 32'h0000_0004);
    opb_wr(BASE + 32'h00, 32'h1 | (1 << 2) | (1 << 5));   // default IRQ_PKTS: a full half
    repeat (300) @(posedge clk_dsp);
    t0 = $realtime;
    for (int i = 0; i < N; i++) gen_pulse(1 + (i % 15), 15 - (i % 13));
    t1 = $realtime;
    repeat (3000) @(posedge clk_opb);
    opb_rd(BASE + 32'h1C, r);
    check(r == 0, $sformatf("LOST %0d at 2 Mcps", r));
    opb_rd(BASE + 32'h18, r);
    check(r == N, $sformatf("SINGLES %0d", r));
    check(received == N && expq.size() == 0, $sformatf("received %0d of %0d", received, N));
    check(irqs >= N / 68, $sformatf("interrupts %0d", irqs));
    $display("offered rate %0.3f Mcps, received %0d events, %0d interrupts",
             N / ((t1 - t0) * 1.0e-3), received, irqs);
    check(N / ((t1 - t0) * 1.0e-3) >= 2.0, "offered rate at least 2 Mcps");
    stop = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk_opb);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
