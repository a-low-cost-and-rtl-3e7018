// calib_pkg: number formats, stage configuration and nominal weights shared by
// the digital calibration back end of a 12-bit, five-stage pipelined ADC
// (stage resolutions 3b-3b-3b-3b-4b, one bit of redundancy per 3b stage, so
// every residue amplifier has a nominal gain of 4).
//
// Number formats (all two's complement):
//   data_t  : sample values in output LSBs of the 12-bit ADC, D_FRAC fraction
//             bits. The first stage has a step of 512 LSB, the back end
//             (stages 2..5) steps of 128, 32, 8 and 1 LSB.
//   coef_t  : calibration coefficients (alpha1 about 1.0, alpha2 and alpha3
//             small), C_FRAC fraction bits.
//   acc_t   : LMS accumulators, ACC_FRAC fraction bits, so that step sizes
//             far below one coefficient LSB still integrate.
// The stage configuration and the dither weight (128 LSB) follow the
// document (its gating threshold, 256 LSB, is a run-time input); the fixed-point widths are this design's
// own choice.
package calib_pkg;

  // ---------------- stage configuration ----------------
  localparam int OUT_BITS = 12;            // ADC resolution
  localparam int S1_BITS  = 3;             // first stage raw code bits
  localparam int S1_STEP  = 512;           // first stage step, LSB
  localparam int N_BE     = 4;             // back-end stages 2..5
  localparam int MAXB     = 4;             // widest back-end raw code
  localparam int STAGE_BITS [N_BE] = '{3, 3, 3, 4};
  localparam int STAGE_STEP [N_BE] = '{128, 32, 8, 1};

  // ---------------- number formats ----------------
  localparam int D_FRAC   = 8;
  localparam int DW       = 22;
  localparam int C_FRAC   = 20;
  localparam int CW       = 24;
  localparam int ACC_FRAC = 40;
  localparam int ACC_W    = 48;

  typedef logic signed [DW-1:0]    data_t;
  typedef logic signed [CW-1:0]    coef_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  localparam coef_t COEF_ONE = coef_t'(1 <<< C_FRAC);

  // ---------------- nonlinearity correction ----------------
  localparam int MAG_INT_BITS = 9;         // |alpha1*D_RES| spans 0..511 LSB
  localparam int LUT2_IDX     = 3;         // MSBs used by LUT_alpha2
  localparam int LUT3_IDX     = 4;         // MSBs used by LUT_alpha3
  localparam int DITHER_LSB   = 128;       // dither weight

  // Indices of the averaged coefficients
  typedef enum logic [2:0] {
    C_A1_S2 = 3'd0,  // alpha1 of the first residue amplifier (stage 2 input)
    C_A1_S3 = 3'd1,
    C_A1_S4 = 3'd2,
    C_A1_S5 = 3'd3,
    C_A2    = 3'd4,  // HD2 coefficient of the first residue amplifier
    C_A3    = 3'd5   // HD3 coefficient of the first residue amplifier
  } coef_idx_e;
  localparam int N_COEF = 6;

  // Reset value of each coefficient: gains 1.0, nonlinear terms 0.
  function automatic coef_t coef_init(int i);
    return (i <= int'(C_A1_S5)) ? COEF_ONE : '0;
  endfunction

  // The LUT_IDX3 most significant bits of |x| over a magnitude range of
  // 2^MAG_INT_BITS LSB (|x| beyond the range saturates to the top entry).
  // LUT_alpha2 uses the top LUT2_IDX of these bits.
  function automatic logic [LUT3_IDX-1:0] mag_msbs(data_t x);
    data_t mag;
    mag = x[DW-1] ? -x : x;
    if ((mag >>> D_FRAC) >= (1 <<< MAG_INT_BITS)) return '1;
    return mag[D_FRAC+MAG_INT_BITS-1 -: LUT3_IDX];
  endfunction

  // Nominal weight of bit j of back-end stage s (s = 0 is ADC stage 2).
  function automatic data_t nom_bit_weight(int s, int j);
    if (j >= STAGE_BITS[s]) return '0;
    return data_t'((STAGE_STEP[s] << j) << D_FRAC);
  endfunction

  // Nominal offset of back-end stage s: the code is centred on its mid-scale,
  // (2^bits - 1)/2 steps.
  function automatic data_t nom_offset(int s);
    return data_t'(-((((1 << STAGE_BITS[s]) - 1) * STAGE_STEP[s]) << D_FRAC) / 2);
  endfunction

endpackage
