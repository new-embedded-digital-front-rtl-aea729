// pet_dsp_core: acquisition DSP core of one PET detector module.
//
// The four Anger signals of a position-sensitive photomultiplier (x+, x-,
// y+, y-) are sampled by a 10-bit ADC. In the 62.5 MHz acquisition domain:
//   adc_ctrl      strobes the ADC and latches the four channels,
//   polarity_blr  makes pulses positive on a zero baseline and forms
//                 x, y, Ex, Ey and the instantaneous energy E = Ex + Ey,
//   pulse_detect  triggers when E crosses the threshold and opens a gate of
//                 a programmable number of samples,
//   delay_line    delays (x, y, Ex, Ey) by d samples (Z^-d) so the gate also
//                 covers the rising edge before the crossing,
//   integrator    sums x, y, Ex, Ey over the gate (Ix, Iy, IEx, IEy),
//   doi_unit      sums the energy of the tail of the gate (decay time),
//   timing_unit   timestamps the crossing against the synchronised counter,
// and the results form a 15-byte event packet pushed into packet_queue, an
// asynchronous FIFO into the 50 MHz bus domain, where core_interface copies
// packets into a two-half shared buffer on the OPB and interrupts the
// processor when a half is ready (see core_interface for the register map).
// Pulses overlap in the pipeline: one can be integrated while earlier ones
// wait in the queue, are copied into the buffer or wait there to be sent.
// `single` pulses for one acquisition clock, two clocks after adc_ctrl
// latches the sample that crosses the threshold; it reports the event to the
// master controller.
// `sync_start` (synchronous to clk_dsp) restarts the time counter.
// Settings cross from the bus domain through two-flop synchronisers and must
// be changed only while CTRL.enable is 0. The bus reset also resets the
// acquisition domain through a synchroniser.
// The structure follows the published block diagram of the core; widths,
// depths and the register layout are this design's own choices.
module pet_dsp_core
  import pet_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR  = 32'h8000_0000,
  parameter int unsigned DELAY_MAX   = 16,
  parameter int unsigned QUEUE_DEPTH = 16,
  parameter int unsigned BUF_BYTES   = 2048
) (
  input  logic        clk_dsp,      // 62.5 MHz acquisition clock
  input  logic        clk_opb,      // 50 MHz bus clock
  input  logic        rst_opb,      // bus reset, active high
  // ADC
  input  adc_sample_t adc_data,
  output logic        adc_clk_en,
  // master controller
  input  logic        sync_start,
  output logic        single,
  // OPB slave
  input  logic        opb_select,
  input  logic        opb_rnw,
  input  logic [31:0] opb_abus,
  input  logic [31:0] opb_dbus,
  input  logic [3:0]  opb_be,
  output logic [31:0] sl_dbus,
  output logic        sl_xferack,
  output logic        irq
);
  // ---------------- resets and settings into the acquisition domain -------
  logic     rst_dsp;
  acq_cfg_t cfg_opb, cfg;
  cdc_sync #(.W(1))               u_rst_sync (.clk(clk_dsp), .d(rst_opb), .q(rst_dsp));
  cdc_sync #(.W($bits(acq_cfg_t))) u_cfg_sync (.clk(clk_dsp), .d(cfg_opb), .q(cfg));

  // ---------------- acquisition pipeline ----------------
  adc_sample_t       sample;
  logic              s_valid, a_valid;
  anger_t            anger, anger_d;
  logic [ETOT_W-1:0] energy;
  logic              trigger, gate, gate_last, busy;

  adc_ctrl u_adc (
    .clk(clk_dsp), .rst(rst_dsp), .div(cfg.adc_div), .adc_in(adc_data),
    .adc_clk_en(adc_clk_en), .sample(sample), .valid(s_valid));

  polarity_blr u_blr (
    .clk(clk_dsp), .rst(rst_dsp), .valid_in(s_valid), .sample(sample),
    .polarity(cfg.polarity), .blr_shift(cfg.blr_shift), .freeze(busy),
    .valid_out(a_valid), .anger(anger), .energy(energy));

  pulse_detect u_det (
    .clk(clk_dsp), .rst(rst_dsp), .en(cfg.enable), .valid(a_valid),
    .energy(energy), .threshold(cfg.threshold), .window(cfg.window),
    .trigger(trigger), .gate(gate), .gate_last(gate_last), .busy(busy));

  delay_line #(.DEPTH(DELAY_MAX)) u_dly (
    .clk(clk_dsp), .rst(rst_dsp), .valid(a_valid), .din(anger),
    .d(cfg.delay[$clog2(DELAY_MAX)-1:0]), .dout(anger_d));

  event_t ev;
  logic   int_done, doi_done, t_done;   // doi/t done: produced in step, unused

  integrator u_int (
    .clk(clk_dsp), .rst(rst_dsp), .gate(gate), .gate_last(gate_last),
    .din(anger_d), .ix(ev.ix), .iy(ev.iy), .iex(ev.iex), .iey(ev.iey),
    .done(int_done));

  doi_unit u_doi (
    .clk(clk_dsp), .rst(rst_dsp), .gate(gate), .gate_last(gate_last),
    .ex(anger_d.ex), .ey(anger_d.ey), .doi_start(cfg.doi_start),
    .doi(ev.doi), .done(doi_done));

  timing_unit u_tim (
    .clk(clk_dsp), .rst(rst_dsp), .sync_start(sync_start), .valid(a_valid),
    .energy(energy), .threshold(cfg.threshold), .trigger(trigger),
    .t(ev.t), .done(t_done));

  always_ff @(posedge clk_dsp) begin
    if (rst_dsp) single <= 1'b0;
    else         single <= trigger;
  end

  // ---------------- queue into the bus domain ----------------
  logic             q_full, q_lost, q_pop, q_empty;
  logic [PKT_W-1:0] q_rdata;

  packet_queue #(.W(PKT_W), .DEPTH(QUEUE_DEPTH)) u_queue (
    .wclk(clk_dsp), .wrst(rst_dsp), .push(int_done), .wdata(ev),
    .full(q_full), .lost(q_lost),
    .rclk(clk_opb), .rrst(rst_opb), .pop(q_pop), .rdata(q_rdata), .empty(q_empty));

  logic single_evt, lost_evt;
  pulse_sync u_single_sync (.clk_src(clk_dsp), .rst_src(rst_dsp), .pulse_src(trigger),
                            .clk_dst(clk_opb), .rst_dst(rst_opb), .pulse_dst(single_evt));
  pulse_sync u_lost_sync   (.clk_src(clk_dsp), .rst_src(rst_dsp), .pulse_src(q_lost),
                            .clk_dst(clk_opb), .rst_dst(rst_opb), .pulse_dst(lost_evt));

  core_interface #(.C_BASEADDR(C_BASEADDR), .BUF_BYTES(BUF_BYTES)) u_if (
    .clk(clk_opb), .rst(rst_opb),
    .opb_select(opb_select), .opb_rnw(opb_rnw), .opb_abus(opb_abus),
    .opb_dbus(opb_dbus), .opb_be(opb_be), .sl_dbus(sl_dbus), .sl_xferack(sl_xferack),
    .cfg(cfg_opb), .q_empty(q_empty), .q_rdata(q_rdata), .q_pop(q_pop),
    .single_evt(single_evt), .lost_evt(lost_evt), .irq(irq));

endmodule
