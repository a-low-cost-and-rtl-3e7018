// adc_ine_calib: digital calibration back end of a 12-bit pipelined ADC
// (stages 3b-3b-3b-3b-4b) that corrects the gain error (IGE) and the
// second- and third-order nonlinearity (INE) of the first residue amplifier
// with a low-latency, multiplier-free main path.
//
// Main path (every sample, adders and multiplexers only):
//   codes -> residue_sum (pre-scaled weights)  -> a1*D_RES       (+1 clk)
//         -> ine_correction (LUT_a2, LUT_a3)     -> D_RES_cal     (+1 clk)
//         -> + stage-1 weight - dither + mid-scale, round, clamp -> dout
//                                                                 (+1 clk)
// dout is valid LAT = 3 clocks after its codes are presented with en high.
// Background path: ine_estimator runs the dither-based, gated LMS loops for
// alpha1..alpha3 of the first amplifier; coef_mean averages them (and the
// externally supplied alpha1 of stages 3..5) over N = 2^LOG2_N samples;
// once per window (upd_o) weight_precompute and the LUT tables are
// reloaded from the means of the previous window.
// dither_gen produces the dither sign for the analogue front end (dither_o)
// and, ADC_LATENCY samples later, the sign of the sample whose codes arrive.
//
// What follows the document: the structure of the precomputed weight
// computation, the LUT-based correction with 3 and 4 MSBs, the gated LMS
// equations, the 128-LSB dither and the 256-LSB threshold (lms_th input).
// This design's choices: the fixed-point formats (calib_pkg), the stage-1
// weights taken as the uncalibrated reference, the window length, the
// pipeline registers, the mode inputs and the way alpha1 of stages 3..5
// enters (as inputs; their estimation is outside this block).
module adc_ine_calib
  import calib_pkg::*;
#(
  parameter int LOG2_N      = 10,   // averaging window 2^LOG2_N samples
  parameter int ADC_LATENCY = 4     // analogue pipeline latency, samples
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,                  // one sample per cycle
  input  logic [S1_BITS-1:0]  code1,               // stage 1 raw code
  input  logic [MAXB-1:0]     code_be   [N_BE],    // stages 2..5 raw codes
  output logic                dither_o,            // to the dither DAC
  input  coef_t               a1_later  [N_BE-1],  // alpha1 of stages 3..5
  input  logic                ige_en,
  input  logic                ine_en,
  input  logic [5:0]          mu1_shift,
  input  logic [5:0]          mu2_shift,
  input  logic [5:0]          mu3_shift,
  input  logic [10:0]         lms_th,
  output logic [OUT_BITS-1:0] dout,                // calibrated output
  output data_t               dres_cal_o,          // D_RES_cal
  output coef_t               alpha1_o,            // current estimates of
  output coef_t               alpha2_o,            // the first amplifier's
  output coef_t               alpha3_o,            // coefficients
  output coef_t               alpha_mean_o [N_COEF],
  output logic                upd_o,               // divided-clock enable
  output logic                gate_o,              // gated LMS update
  output data_t               dlms_o               // D_LMS (estimation)
);
  // ---------------- dither ----------------
  logic d_now;
  dither_gen #(.LATENCY(ADC_LATENCY)) u_dither (
    .clk, .rst_n, .en, .dither_o, .dither_aligned_o(d_now)
  );

  // ---------------- background estimation ----------------
  data_t q_bit [N_BE][MAXB], q_off [N_BE];
  data_t p_bit [N_BE][MAXB], p_off [N_BE];

  ine_estimator u_est (
    .clk, .rst_n, .en, .code(code_be), .dither(d_now),
    .q_bit, .q_off, .ige_en, .ine_en,
    .mu1_shift, .mu2_shift, .mu3_shift, .lms_th,
    .a1_o(alpha1_o), .a2_o(alpha2_o), .a3_o(alpha3_o),
    .dlms_o, .gate_o
  );

  coef_t coef_all [N_COEF];
  assign coef_all[C_A1_S2] = alpha1_o;
  assign coef_all[C_A1_S3] = a1_later[0];
  assign coef_all[C_A1_S4] = a1_later[1];
  assign coef_all[C_A1_S5] = a1_later[2];
  assign coef_all[C_A2]    = alpha2_o;
  assign coef_all[C_A3]    = alpha3_o;

  coef_mean #(.LOG2_N(LOG2_N)) u_mean (
    .clk, .rst_n, .en, .coef_in(coef_all), .mean_o(alpha_mean_o), .upd_o
  );

  coef_t a1_mean [N_BE];
  for (genvar s = 0; s < N_BE; s++) begin : g_a1
    assign a1_mean[s] = alpha_mean_o[s];
  end

  weight_precompute u_pre (
    .clk, .rst_n, .upd(upd_o), .a1_mean, .p_bit, .p_off, .q_bit, .q_off
  );

  // ---------------- main path ----------------
  data_t res;
  residue_sum u_res (
    .clk, .rst_n, .en, .code(code_be), .w_bit(p_bit), .w_off(p_off),
    .res_o(res)
  );

  ine_correction u_ine (
    .clk, .rst_n, .en, .upd(upd_o),
    .a2_mean(alpha_mean_o[C_A2]), .a3_mean(alpha_mean_o[C_A3]),
    .res_i(res), .cal_o(dres_cal_o)
  );

  // stage-1 code and dither sign follow the two pipeline stages
  logic [S1_BITS-1:0] c1_pipe [2];
  logic [1:0]         d_pipe;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      c1_pipe <= '{default: '0};
      d_pipe  <= '0;
    end else if (en) begin
      c1_pipe <= '{code1, c1_pipe[0]};
      d_pipe  <= {d_pipe[0], d_now};
    end

  localparam int    OW       = DW + 2;
  localparam data_t S1_OFF   = data_t'(-((((1 << S1_BITS) - 1) * S1_STEP) << D_FRAC) / 2);
  localparam data_t MID      = data_t'((1 << (OUT_BITS - 1)) << D_FRAC);
  localparam data_t DITH     = data_t'(DITHER_LSB <<< D_FRAC);
  localparam data_t HALF     = data_t'(1 <<< (D_FRAC - 1));

  logic signed [OW-1:0] total, rounded;
  always_comb begin
    total = OW'(S1_OFF) + OW'(MID) + OW'(HALF) + OW'(dres_cal_o)
          + OW'(data_t'(c1_pipe[1]) * data_t'(S1_STEP << D_FRAC));
    total = d_pipe[1] ? total - OW'(DITH) : total + OW'(DITH);
    rounded = total >>> D_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dout <= '0;
    else if (en) begin
      if (rounded < 0)                          dout <= '0;
      else if (rounded > OW'((1 << OUT_BITS) - 1)) dout <= '1;
      else                                      dout <= OUT_BITS'(rounded);
    end
endmodule
