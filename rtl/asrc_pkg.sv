// Shared constants of the asynchronous sample rate converter (ASRC).
//
// Fixed-point conventions used across the core:
//   * conversion ratio and its inverse: RO_W = 35 bits, unsigned, RO_FRAC = 30
//     fractional bits (Q5.30), so ratios up to 31.99 are representable;
//   * h_step and alpha: unsigned Q1.30 (31 bits);
//   * coefficient address: unsigned Q4.30 (34 bits); its top 14 bits address
//     the half-sinc ROM (16 zero crossings x 1024 entries per crossing) and
//     the lower 20 bits are the linear interpolation fraction;
//   * audio samples: signed Q1.(SAMP_W-1).
// The sample width, channel-count width, ratio width and buffer size follow
// the core's synthesis parameter table; the fractional split of the ratio
// words and the ROM geometry (32 zeros, 10 address bits per zero, 24-bit
// coefficients) follow the coefficient generation description.
package asrc_pkg;

  localparam int unsigned RO_FRAC      = 30;   // fractional bits of ratio words
  localparam int unsigned HSTEP_W      = 31;   // Q1.30
  localparam int unsigned CADDR_W      = 34;   // Q4.30 coefficient address
  localparam int unsigned ROM_AW       = 14;   // ROM address bits
  localparam int unsigned ROM_DW       = 24;   // ROM word (H_bits)
  localparam int unsigned COEF_W       = 34;   // interpolated coefficient, Q1.33
  localparam int unsigned FILT_NZEROS  = 32;   // zeros of the windowed sinc
  localparam int unsigned FILT_NFRAC   = 10;   // ROM entries per zero (log2)
  localparam real         KAISER_BETA  = 14.4; // window shape parameter

  // 0.875 in Q1.30: upper bound of h_step for upsampling
  localparam logic [HSTEP_W-1:0] HSTEP_MAX = 31'(7) << (RO_FRAC - 3);

  // Ratio estimator FSM states (numbering follows the state list of the design)
  typedef enum logic [3:0] {
    RE_INIT       = 4'd0,
    RE_MEASURE    = 4'd1,
    RE_MUL_P1     = 4'd2,
    RE_WAIT_P1    = 4'd3,
    RE_MUL_P2     = 4'd4,
    RE_WAIT_P2    = 4'd5,
    RE_DIV_RO     = 4'd6,
    RE_WAIT_RO    = 4'd7,
    RE_DIV_INV    = 4'd8,
    RE_WAIT_INV   = 4'd9,
    RE_DELAY      = 4'd10,
    RE_DIV_DELAY  = 4'd11,
    RE_WAIT_DELAY = 4'd12
  } re_state_e;

  // Error bit positions of the core's error output
  localparam int unsigned ERR_NCH      = 0;  // channel count not a power of two
  localparam int unsigned ERR_PTR_DIFF = 1;  // read/write pointer distance lost
  localparam int unsigned ERR_OUTBUF   = 2;  // output buffer overflow

endpackage
