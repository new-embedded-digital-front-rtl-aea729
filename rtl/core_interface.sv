// core_interface: OPB slave of the acquisition core (bus clock domain).
//
// It gives the processor three things:
//  * Eight 32-bit registers at byte offsets 0x00-0x1C of the core's window:
//      0x00 CTRL     [0] enable, [4:1] invert x+,x-,y+,y-, [5] irq enable,
//                    [8] flush (write 1: close the half being filled now)
//      0x04 THRESH   [11:0] energy threshold
//      0x08 WINDOW   [7:0] gate length in samples, [15:8] first tail sample
//                    of the decay measure, [19:16] pre-trigger delay d
//      0x0C ACQ      [3:0] baseline filter shift, [11:8] ADC divider
//      0x10 IRQ_PKTS [7:0] packets per half that close it (1..MAX_PKTS)
//      0x14 STATUS   read: [0],[1] half 0/1 full, [2] half being filled,
//                    [3] queue empty, [23:16],[31:24] packets in half 0/1;
//                    write: [0],[1] release half 0/1 after it was sent
//      0x18 SINGLES  events detected (write clears)
//      0x1C LOST     events lost because the queue was full (write clears)
//  * A dual-port packet buffer of BUF_BYTES at offset BUF_BYTES, split in two
//    halves used in turn. The core copies 15-byte packets from the queue into
//    the half being filled, one byte per clock, packed back to back with no
//    padding and big-endian (byte address 4n is bits [31:24] of word n).
//    When the half holds IRQ_PKTS packets (or on a flush) it is marked full,
//    the core moves to the other half, and `irq` is raised while any half is
//    full and interrupts are enabled. The processor hands a full half to the
//    network stack in place and releases it through STATUS. If the other half
//    is still full the core stops draining and the queue absorbs the burst.
//  * `irq`, a level for the interrupt controller.
// OPB timing: a selected access in the window is acknowledged with a one-cycle
// `sl_xferack` on the next clock, read data on `sl_dbus` in that cycle and
// zero otherwise. Writes ignore byte enables; processor writes to the buffer
// are acknowledged and discarded. The published design gives the eight
// registers, the shared memory and the interrupt on enough stored data; the
// register layout, the two halves and the bus timing are this design's own.
module core_interface
  import pet_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h8000_0000,
  parameter int unsigned BUF_BYTES  = 2048
) (
  input  logic              clk,
  input  logic              rst,
  // OPB slave
  input  logic              opb_select,
  input  logic              opb_rnw,
  input  logic [31:0]       opb_abus,
  input  logic [31:0]       opb_dbus,
  input  logic [3:0]        opb_be,
  output logic [31:0]       sl_dbus,
  output logic              sl_xferack,
  // settings for the acquisition side
  output acq_cfg_t          cfg,
  // queue read side
  input  logic              q_empty,
  input  logic [PKT_W-1:0]  q_rdata,
  output logic              q_pop,
  // event pulses already in this clock domain
  input  logic              single_evt,
  input  logic              lost_evt,
  output logic              irq
);
  localparam int unsigned BA       = $clog2(BUF_BYTES);      // buffer byte address bits
  localparam int unsigned HALF     = BUF_BYTES / 2;
  localparam int unsigned HA       = BA - 1;
  localparam int unsigned WORDS    = BUF_BYTES / 4;
  localparam int unsigned MAX_PKTS = HALF / PKT_BYTES;

  // ---------------- registers ----------------
  logic        enable, irq_en, flush_req;
  logic [3:0]  polarity;
  logic [ETOT_W-1:0] threshold;
  logic [7:0]  window, doi_start, irq_pkts;
  logic [3:0]  delay, blr_shift, adc_div;
  logic [31:0] singles, lost;

  // ---------------- buffer state ----------------
  logic [3:0][7:0]   mem [WORDS];
  logic              fill;                // half being filled
  logic [1:0]        hfull;
  logic [7:0]        pcnt [2];            // packets in each half
  logic [HA-1:0]     bptr;                // next byte in the half being filled
  logic [PKT_W-1:0]  shreg;
  logic [3:0]        bidx;
  logic              writing;
  logic [7:0]        pkts_thr;

  assign pkts_thr = (irq_pkts == 8'd0) ? 8'd1
                  : (irq_pkts > 8'(MAX_PKTS)) ? 8'(MAX_PKTS) : irq_pkts;

  assign cfg = '{enable: enable, polarity: polarity, threshold: threshold,
                 window: window, doi_start: doi_start, delay: delay,
                 blr_shift: blr_shift, adc_div: adc_div};

  assign irq   = irq_en && (|hfull);
  assign q_pop = !writing && !q_empty && !hfull[fill] && !flush_req;

  // ---------------- OPB decode ----------------
  logic        hit, req, is_buf;
  logic [$clog2(N_REGS)-1:0] reg_a;
  logic [BA-3:0] word_a;
  logic [31:0] reg_rd;

  assign hit    = opb_select && (opb_abus[31:BA+1] == C_BASEADDR[31:BA+1]);
  assign req    = hit && !sl_xferack;
  assign is_buf = opb_abus[BA];
  assign reg_a  = opb_abus[$clog2(N_REGS)+1:2];
  assign word_a = opb_abus[BA-1:2];

  always_comb begin
    unique case (reg_a)
      REG_CTRL:     reg_rd = {26'd0, irq_en, polarity, enable};
      REG_THRESH:   reg_rd = 32'(threshold);
      REG_WINDOW:   reg_rd = {12'd0, delay, doi_start, window};
      REG_ACQ:      reg_rd = {20'd0, adc_div, 4'd0, blr_shift};
      REG_IRQ_PKTS: reg_rd = {24'd0, irq_pkts};
      REG_STATUS:   reg_rd = {pcnt[1], pcnt[0], 12'd0, q_empty, fill, hfull};
      REG_SINGLES:  reg_rd = singles;
      default:      reg_rd = lost;
    endcase
  end

  // Buffer read port (bus side).
  logic [31:0] buf_rd;
  always_ff @(posedge clk) buf_rd <= mem[word_a];

  logic rd_buf_q;
  logic [31:0] reg_rd_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      sl_xferack <= 1'b0;
      rd_buf_q   <= 1'b0;
      reg_rd_q   <= '0;
    end else begin
      sl_xferack <= req;
      rd_buf_q   <= req && opb_rnw && is_buf;
      reg_rd_q   <= (req && opb_rnw && !is_buf) ? reg_rd : '0;
    end
  end
  assign sl_dbus = rd_buf_q ? buf_rd : reg_rd_q;

  // ---------------- buffer write port (core side) ----------------
  logic [BA-1:0] wr_byte;
  assign wr_byte = {fill, bptr};
  always_ff @(posedge clk) begin
    if (writing) mem[wr_byte[BA-1:2]][3 - wr_byte[1:0]] <= shreg[PKT_W-1 -: 8];
  end

  // ---------------- registers, counters and the filling machine -----------
  logic reg_wr;
  assign reg_wr = req && !opb_rnw && !is_buf;

  always_ff @(posedge clk) begin
    if (rst) begin
      enable    <= 1'b0;
      irq_en    <= 1'b1;
      polarity  <= '0;
      threshold <= ETOT_W'(200);
      window    <= 8'd16;
      doi_start <= 8'd8;
      delay     <= 4'd2;
      blr_shift <= 4'd4;
      adc_div   <= 4'd0;
      irq_pkts  <= 8'(MAX_PKTS);
      flush_req <= 1'b0;
      singles   <= '0;
      lost      <= '0;
      fill      <= 1'b0;
      hfull     <= '0;
      pcnt[0]   <= '0;
      pcnt[1]   <= '0;
      bptr      <= '0;
      bidx      <= '0;
      writing   <= 1'b0;
      shreg     <= '0;
    end else begin
      if (single_evt) singles <= singles + 32'd1;
      if (lost_evt)   lost    <= lost + 32'd1;

      // Copy one packet, a byte per clock.
      if (q_pop) begin
        shreg   <= q_rdata;
        bidx    <= '0;
        writing <= 1'b1;
      end else if (writing) begin
        shreg <= shreg << 8;
        bptr  <= bptr + 1'b1;
        bidx  <= bidx + 4'd1;
        if (bidx == 4'(PKT_BYTES - 1)) begin
          writing <= 1'b0;
          pcnt[fill] <= pcnt[fill] + 8'd1;
          if (pcnt[fill] + 8'd1 >= pkts_thr) begin
            hfull[fill] <= 1'b1;
            fill        <= ~fill;
            bptr        <= '0;
          end
        end
      end else if (flush_req) begin
        flush_req <= 1'b0;
        if (pcnt[fill] != 8'd0 && !hfull[fill]) begin
          hfull[fill] <= 1'b1;
          fill        <= ~fill;
          bptr        <= '0;
        end
      end

      if (reg_wr) begin
        unique case (reg_a)
          REG_CTRL: begin
            enable   <= opb_dbus[0];
            polarity <= opb_dbus[4:1];
            irq_en   <= opb_dbus[5];
            if (opb_dbus[8]) flush_req <= 1'b1;
          end
          REG_THRESH:   threshold <= opb_dbus[ETOT_W-1:0];
          REG_WINDOW:   {delay, doi_start, window} <= opb_dbus[19:0];
          REG_ACQ:      {adc_div, blr_shift} <= {opb_dbus[11:8], opb_dbus[3:0]};
          REG_IRQ_PKTS: irq_pkts <= opb_dbus[7:0];
          REG_STATUS: begin
            for (int h = 0; h < 2; h++)
              if (opb_dbus[h] && hfull[h]) begin
                hfull[h] <= 1'b0;
                pcnt[h]  <= '0;
              end
          end
          REG_SINGLES:  singles <= '0;
          default:      lost    <= '0;
        endcase
      end
    end
  end

  // OPB slave rules: an acknowledge lasts one cycle and answers a select.
  assert property (@(posedge clk) disable iff (rst) sl_xferack |=> !sl_xferack);
  assert property (@(posedge clk) disable iff (rst) sl_xferack |-> $past(opb_select));

  initial assert (BUF_BYTES >= 64 && (1 << BA) == BUF_BYTES && MAX_PKTS <= 255)
    else $error("core_interface: BUF_BYTES must be a power of two, 64..8192");
endmodule
