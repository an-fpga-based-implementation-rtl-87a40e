// tx_pkg: widths, table sizes and constants shared by the BPSK transmitter.
//
// The baseband sample is an 8-bit signed value (two's complement, 1.0 = 64).
// The carrier is an 8-bit signed sine/cosine sample of amplitude 127. Passband
// samples are 16-bit signed products of the two. The symbol rate is the
// 100 MHz sample clock divided by the oversampling factor of 16 (6.25 MHz).
// The table sizes are the ones the transmitter was specified with: a 512 x 8
// pulse-shaping ROM addressed by a 5-bit bit history and a 4-bit sample
// phase. The DDS widths (32-bit phase accumulator, 1024-entry sine table) are
// this design's own choice.
package tx_pkg;

  // Baseband pulse shaping (ROM-based raised-cosine filter)
  localparam int unsigned WINDOW      = 5;           // bits in the shift register
  localparam int unsigned OSF_LOG2    = 4;           // 16 samples per symbol
  localparam int unsigned ROM_AW      = WINDOW + OSF_LOG2;  // 9-bit ROM address
  localparam int unsigned ROM_DEPTH   = 1 << ROM_AW;        // 512 words
  localparam int unsigned BB_W        = 8;           // ROM word / baseband sample, 1.0 = 64

  // Direct digital synthesizer
  localparam int unsigned PHASE_W     = 32;          // phase accumulator width
  localparam int unsigned LUT_AW      = 10;          // quantized phase (table depth 1024)
  localparam int unsigned CAR_W       = 8;           // sine/cosine sample width, amplitude 127
  // 10 MHz carrier from a 100 MHz clock: round(2**32 * 10/100)
  localparam logic [PHASE_W-1:0] CARRIER_INC_10MHZ = 32'd429496730;

  // Passband / channel samples
  localparam int unsigned PB_W        = BB_W + CAR_W;  // 16-bit products

  // Channel fractional delay: unsigned fixed point, 4 integer and 8 fraction bits
  localparam int unsigned DLY_INT_W   = 4;
  localparam int unsigned DLY_FRAC_W  = 8;
  localparam int unsigned DLY_W       = DLY_INT_W + DLY_FRAC_W;
  // 3.8 samples: 3 + round(0.8 * 256) / 256 = 3.80078
  localparam logic [DLY_W-1:0] CH_DELAY_3P8 = 12'd973;

  typedef logic signed [BB_W-1:0]  bb_sample_t;
  typedef logic signed [CAR_W-1:0] car_sample_t;
  typedef logic signed [PB_W-1:0]  pb_sample_t;
  typedef logic [PHASE_W-1:0]      phase_t;
  typedef logic [DLY_W-1:0]        delay_t;

  // Saturate a wider signed value to a passband sample
  function automatic pb_sample_t sat_pb(input logic signed [PB_W+9:0] v);
    localparam logic signed [PB_W+9:0] MAXV = (1 <<< (PB_W-1)) - 1;
    localparam logic signed [PB_W+9:0] MINV = -(1 <<< (PB_W-1));
    if (v > MAXV)      return pb_sample_t'(MAXV);
    else if (v < MINV) return pb_sample_t'(MINV);
    else               return pb_sample_t'(v);
  endfunction

endpackage
