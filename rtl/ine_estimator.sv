// ine_estimator: background estimation of the gain (alpha1) and second- and
// third-order nonlinearity (alpha2, alpha3) coefficients of the first
// residue amplifier, with a one-bit pseudo-random dither of DITHER_LSB LSB
// injected in front of that amplifier.
//
// Estimation-path correction (not latency critical, so it uses the current
// coefficients and real multipliers):
//   x    = alpha1 * D_RES       (D_RES from q-weights: later stages' gains)
//   corr = x + alpha2*i3^2 + sign(x)*alpha3*i4^3
//          i4 = 4 MSBs of |x|, i3 = top 3 of them (same basis as the LUTs)
//   D_LMS = corr - D_d * DITHER_LSB
// Coefficient updates (D_d = +1/-1 is the dither sign, mu = 2^-mu_shift in
// units of coefficient per LSB of D_LMS):
//   alpha1 -= mu1 * D_d * D_LMS                     every sample   (Eq. 3)
//   alpha2 -= mu2 * D_d * |D_LMS|   when |D_LMS| > lms_th           (Eq. 5)
//   alpha3 -= mu3 * D_d * D_LMS     when |D_LMS| > lms_th           (Eq. 3)
// The update equations, the gating and the dither and threshold values
// follow the document. The pipelining, the fixed-point formats, the use of
// the LUT index basis i^2, i^3 inside the estimation loop (so the averaged
// coefficients can be used directly by the LUTs) and the enable modes are
// this design's choices: with ige_en low alpha1 is held at 1.0, with ine_en
// low alpha2 and alpha3 are held at 0 (no calibration / gain only / gain
// and nonlinearity).
//
// Timing: four register stages (weight sum, alpha1 product, correction and
// D_LMS, accumulators), all advanced by en. dither must be the sign of the
// sample whose codes are on code. Accumulators saturate at the coefficient
// range. Reset: alpha1 = 1.0, alpha2 = alpha3 = 0.
module ine_estimator
  import calib_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [MAXB-1:0] code  [N_BE],        // raw codes of stages 2..5
  input  logic            dither,              // D_d of this sample, 1 = +
  input  data_t           q_bit [N_BE][MAXB],  // weights without alpha1 of RA1
  input  data_t           q_off [N_BE],
  input  logic            ige_en,              // estimate alpha1
  input  logic            ine_en,              // estimate alpha2, alpha3
  input  logic [5:0]      mu1_shift,
  input  logic [5:0]      mu2_shift,
  input  logic [5:0]      mu3_shift,
  input  logic [10:0]     lms_th,              // gating threshold, LSB
  output coef_t           a1_o,
  output coef_t           a2_o,
  output coef_t           a3_o,
  output data_t           dlms_o,              // D_LMS of the last update
  output logic            gate_o               // last update was gated on
);
  localparam int SH = ACC_FRAC - C_FRAC;
  localparam acc_t ACC_ONE = acc_t'(1) <<< ACC_FRAC;
  localparam acc_t ACC_MAX = (acc_t'(1) <<< (CW - 1 + SH)) - 1;
  localparam acc_t ACC_MIN = -(acc_t'(1) <<< (CW - 1 + SH));
  localparam data_t DITH   = data_t'(DITHER_LSB <<< D_FRAC);

  // ---- stage 1: D_RES with the later stages' gains ----
  data_t dres;
  residue_sum u_sum (
    .clk, .rst_n, .en, .code, .w_bit(q_bit), .w_off(q_off), .res_o(dres)
  );

  logic [2:0] d_pipe;   // dither sign following the pipeline
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  d_pipe <= '0;
    else if (en) d_pipe <= {d_pipe[1:0], dither};

  // ---- stage 2: x = alpha1 * D_RES ----
  data_t x;
  logic signed [CW+DW-1:0] xp;
  assign xp = (CW+DW)'(a1_o) * (CW+DW)'(dres) + (CW+DW)'(1 <<< (C_FRAC - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  x <= '0;
    else if (en) x <= data_t'(xp >>> C_FRAC);

  // ---- stage 3: nonlinear correction and D_LMS ----
  localparam int NW = CW + 16;
  logic [LUT3_IDX-1:0] i4;
  logic [LUT2_IDX-1:0] i3;
  logic [6:0]           sq;
  logic [11:0]          cu;
  logic signed [NW-1:0] t2, t3, tn;
  data_t corr, dlms_next;

  always_comb begin
    i4 = mag_msbs(x);
    i3 = i4[LUT3_IDX-1 -: LUT2_IDX];
    sq = 7'(i3) * 7'(i3);
    cu = 12'(i4) * 12'(i4) * 12'(i4);
    t2 = NW'(a2_o) * NW'($signed({1'b0, sq}));
    t3 = NW'(a3_o) * NW'($signed({1'b0, cu}));
    if (x[DW-1]) t3 = -t3;
    tn = t2 + t3 + NW'(1 <<< (C_FRAC - D_FRAC - 1));
    corr = x + data_t'(tn >>> (C_FRAC - D_FRAC));
    dlms_next = d_pipe[1] ? corr - DITH : corr + DITH;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  dlms_o <= '0;
    else if (en) dlms_o <= dlms_next;

  // ---- stage 4: LMS accumulators ----
  acc_t acc1, acc2, acc3;
  data_t dabs;
  logic  dsgn;
  assign dsgn   = d_pipe[2];
  assign dabs   = dlms_o[DW-1] ? -dlms_o : dlms_o;
  assign gate_o = dabs > data_t'({lms_th, {D_FRAC{1'b0}}});

  // mu * D_d * v in accumulator units
  function automatic logic signed [63:0] step(data_t v, logic d, logic [5:0] mu);
    logic signed [63:0] s;
    s = (64'(v) <<< (ACC_FRAC - D_FRAC)) >>> mu;
    return d ? s : -s;
  endfunction

  function automatic acc_t sat(logic signed [63:0] v);
    if (v > 64'(ACC_MAX)) return ACC_MAX;
    if (v < 64'(ACC_MIN)) return ACC_MIN;
    return acc_t'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc1 <= ACC_ONE;
      acc2 <= '0;
      acc3 <= '0;
    end else if (en) begin
      if (!ige_en) acc1 <= ACC_ONE;
      else         acc1 <= sat(64'(acc1) - step(dlms_o, dsgn, mu1_shift));
      if (!ine_en) begin
        acc2 <= '0;
        acc3 <= '0;
      end else if (gate_o) begin
        acc2 <= sat(64'(acc2) - step(dabs, dsgn, mu2_shift));
        acc3 <= sat(64'(acc3) - step(dlms_o, dsgn, mu3_shift));
      end
    end

  assign a1_o = coef_t'(acc1 >>> SH);
  assign a2_o = coef_t'(acc2 >>> SH);
  assign a3_o = coef_t'(acc3 >>> SH);
endmodule
