// pet_pkg: types and constants shared by the PET acquisition DSP core.
//
// The front end digitises the four Anger signals of a position-sensitive
// photomultiplier (x+, x-, y+, y-) with a 10-bit ADC, detects scintillation
// pulses and reduces each one to a 15-byte event packet holding the integrals
// of the position and energy signals, a decay-time (depth of interaction)
// measure and a timestamp. The 10-bit samples, the four channels, the 15-byte
// packet and the 8 configuration/status registers follow the published design;
// every field width inside the packet and the register layout are this
// design's own choices.
package pet_pkg;

  localparam int unsigned ADC_W   = 10;             // ADC resolution
  localparam int unsigned POS_W   = ADC_W + 1;      // x = x+ - x-  (signed)
  localparam int unsigned EN_W    = ADC_W + 1;      // Ex = x+ + x- (unsigned)
  localparam int unsigned ETOT_W  = EN_W + 1;       // E = Ex + Ey
  localparam int unsigned INT_W   = 18;             // integral fields
  localparam int unsigned DOI_W   = 16;             // tail integral field
  localparam int unsigned FINE_W  = 4;              // timestamp fraction bits
  localparam int unsigned T_W     = 32;             // timestamp field
  localparam int unsigned PKT_BYTES = 15;
  localparam int unsigned PKT_W   = 8 * PKT_BYTES;  // 120 bits
  localparam int unsigned N_REGS  = 8;

  // Raw samples of the four Anger channels.
  typedef struct packed {
    logic [ADC_W-1:0] xp;
    logic [ADC_W-1:0] xn;
    logic [ADC_W-1:0] yp;
    logic [ADC_W-1:0] yn;
  } adc_sample_t;

  // Baseline-corrected Anger combinations of one sample.
  typedef struct packed {
    logic signed [POS_W-1:0] x;
    logic signed [POS_W-1:0] y;
    logic        [EN_W-1:0]  ex;
    logic        [EN_W-1:0]  ey;
  } anger_t;

  // One detected event; packed MSB first, so byte 0 of the packet is t[31:24].
  typedef struct packed {
    logic        [T_W-1:0]   t;
    logic        [DOI_W-1:0] doi;
    logic        [INT_W-1:0] iey;
    logic        [INT_W-1:0] iex;
    logic signed [INT_W-1:0] iy;
    logic signed [INT_W-1:0] ix;
  } event_t;

  // Acquisition settings, written over the bus and used by the 62.5 MHz side.
  typedef struct packed {
    logic              enable;     // CTRL[0]
    logic [3:0]        polarity;   // CTRL[4:1]: invert xp,xn,yp,yn (bit 1 = xp)
    logic [ETOT_W-1:0] threshold;  // THRESH[11:0]
    logic [7:0]        window;     // WINDOW[7:0]   samples integrated (0 means 1)
    logic [7:0]        doi_start;  // WINDOW[15:8]  first tail sample in the window
    logic [3:0]        delay;      // WINDOW[19:16] d of the Z^-d delay
    logic [3:0]        blr_shift;  // ACQ[3:0]      baseline filter time constant 2^k
    logic [3:0]        adc_div;    // ACQ[11:8]     sample every adc_div+1 clocks
  } acq_cfg_t;

  // Register word offsets (byte address bits [4:2]).
  typedef enum logic [2:0] {
    REG_CTRL     = 3'd0,
    REG_THRESH   = 3'd1,
    REG_WINDOW   = 3'd2,
    REG_ACQ      = 3'd3,
    REG_IRQ_PKTS = 3'd4,
    REG_STATUS   = 3'd5,
    REG_SINGLES  = 3'd6,
    REG_LOST     = 3'd7
  } reg_addr_e;

endpackage
