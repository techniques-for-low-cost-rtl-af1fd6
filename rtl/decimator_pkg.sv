// decimator_pkg - shared widths, types and helpers of the quadrature-receiver
// DSP chain (I/Q imbalance correction, window filter, block-floating-point FFT).
//
// Number formats used throughout:
//   * Corrected receiver samples are 14-bit two's complement (the correction
//     result is cut back to 14 bits, as in the design this follows).
//   * Stat coefficients are 18-bit two's complement Q1.17, sized for an
//     18 x 18 hardware multiplier. The gain coefficient holds epsilon, the
//     phase coefficient holds sin(phi).
//   * Window and FFT samples are 16-bit two's complement. Window coefficients
//     are 16-bit two's complement Q2.14, so that 1.0 (0x4000) is exact for
//     the rectangular window and the small negative lobes of a flat-top
//     window can be held. These formats are this design's choice.
package decimator_pkg;

  localparam int unsigned SAMPLE_W   = 14;  // corrected receiver sample
  localparam int unsigned COEF_W     = 18;  // Stat coefficient, Q1.17
  localparam int unsigned COEF_FRAC  = 17;
  localparam int unsigned ACC_W      = 48;  // Stat running sums
  localparam int unsigned CNT_W      = 18;  // Stat sample counter
  localparam int unsigned DATA_W     = 16;  // window / FFT sample
  localparam int unsigned WCOEF_W    = 16;  // window coefficient, signed Q2.14
  localparam int unsigned WCOEF_FRAC = 14;

  // Complex sample carried between blocks of the frequency-domain path.
  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx16_t;

  // Phase of the Stat coefficient-finding sequence.
  typedef enum logic [2:0] {
    ST_IDLE       = 3'd0,  // correcting with the coefficients held
    ST_GAIN_SUM   = 3'd1,  // summing raw samples for the gain estimate
    ST_GAIN_WAIT  = 3'd2,  // sums offered, waiting for the gain coefficient
    ST_PHASE_SUM  = 3'd3,  // summing gain-corrected samples for the phase estimate
    ST_PHASE_WAIT = 3'd4   // sums offered, waiting for the phase coefficient
  } stat_state_e;

  // Saturate a wide signed value into W bits.
  function automatic logic signed [SAMPLE_W-1:0] sat_sample(input logic signed [47:0] v);
    logic signed [47:0] hi, lo;
    hi = 48'sd1 <<< (SAMPLE_W-1);
    hi = hi - 48'sd1;
    lo = -(48'sd1 <<< (SAMPLE_W-1));
    if (v > hi)      return hi[SAMPLE_W-1:0];
    else if (v < lo) return lo[SAMPLE_W-1:0];
    else             return v[SAMPLE_W-1:0];
  endfunction

endpackage
