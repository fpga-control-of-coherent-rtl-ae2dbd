// cps_pkg: types and constants shared by the coherent-pulse-stacking control
// firmware.
//
// The fast ADC delivers 12-bit samples at 400 MS/s. Each sample sits in a
// 16-bit lane (4 padding bits + 12 data bits) and eight consecutive lanes
// form one 128-bit stream word at the 50 MHz processing clock. The fast DAC
// takes the same 8 x 16-bit stream. The slow DAC is a 12-bit AD5628 octal
// DAC driven over SPI. The 8-lane packing, the 12-bit samples, the 13-pulse
// burst and the 24-deep capture buffer follow the design description; the
// remaining widths (coefficients, phase, gains) are this design's choices.
package cps_pkg;

  localparam int unsigned LANES     = 8;           // samples per 50 MHz word
  localparam int unsigned LANE_W    = 16;          // bits per lane (4 + 12)
  localparam int unsigned SAMP_W    = 12;          // ADC resolution
  localparam int unsigned STREAM_W  = LANES * LANE_W;
  localparam int unsigned NPULSE    = 13;          // pulses in the burst
  localparam int unsigned CAP_DEPTH = 24;          // capture buffer depth
  localparam int unsigned COEF_W    = 16;          // calibrated vector parts
  localparam int unsigned ACC_W     = 32;          // dot-product sums
  localparam int unsigned PHASE_W   = 16;          // full turn = 2**PHASE_W
  localparam int unsigned SDAC_W    = 12;          // AD5628 resolution
  localparam int unsigned SDAC_CH_W = 3;           // AD5628 has 8 channels

  typedef logic [STREAM_W-1:0]       stream_t;
  typedef logic signed [SAMP_W-1:0]  samp_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic signed [ACC_W-1:0]   acc_t;
  typedef logic signed [PHASE_W-1:0] phase_t;
  typedef logic [SDAC_W-1:0]         sdac_t;

  // One slow-DAC update request.
  typedef struct packed {
    logic [SDAC_CH_W-1:0] ch;
    sdac_t                code;
  } sdac_req_t;

  // AD5628 command nibble: write to and update DAC channel n.
  localparam logic [3:0] AD5628_CMD_WRITE_UPDATE = 4'b0011;

  // Lane k (0 = oldest sample) of a stream word, low 12 bits, as signed.
  function automatic samp_t lane_sample(stream_t w, int unsigned k);
    return samp_t'(w[k*LANE_W +: SAMP_W]);
  endfunction

endpackage
