// tb_adc_ine_calib: end-to-end test of the calibration back end at its
// default parameters (1024-sample averaging window, 4-sample analogue
// latency), driven by the behavioural ADC model of adc_model_pkg with a
// first residue amplifier that has a +1 % gain error, HD2 and HD3.
//
// Phases (mode switch through ige_en / ine_en):
//   1. calibration off: every dout must equal the ideal reconstruction of
//      the codes (nominal weights, dither removed, rounded), exactly
//      3 clocks after its codes; this checks the main-path latency.
//   2. gain calibration only, 600k samples.
//   3. gain and nonlinearity calibration, 1.2M samples.
// At the end of each phase the rms error of dout against the ideal
// conversion of the analogue input is measured over 32k samples; it must
// fall from phase to phase. Mechanisms counted, each must occur: coefficient
// window updates (weights and LUTs reloaded), gated LMS updates, both dither
// signs, negative residues with a non-zero HD3 table entry (sign path),
// each of the three modes.
module tb_adc_ine_calib;
  import calib_pkg::*;
  import adc_model_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [S1_BITS-1:0] code1;
  logic [MAXB-1:0] code_be [N_BE];
  logic dither;
  coef_t a1_later [N_BE-1];
  logic ige_en = 0, ine_en = 0;
  logic [5:0] mu1, mu2, mu3;
  logic [10:0] th;
  logic [OUT_BITS-1:0] dout;
  data_t dres_cal, dlms;
  coef_t alpha1, alpha2, alpha3, alpha_mean [N_COEF];
  logic upd, gate;

  adc_ine_calib dut (
    .clk, .rst_n, .en, .code1, .code_be, .dither_o(dither), .a1_later,
    .ige_en, .ine_en, .mu1_shift(mu1), .mu2_shift(mu2), .mu3_shift(mu3),
    .lms_th(th), .dout, .dres_cal_o(dres_cal), .alpha1_o(alpha1), .alpha2_o(alpha2), .alpha3_o(alpha3),
    .alpha_mean_o(alpha_mean), .upd_o(upd), .gate_o(gate), .dlms_o(dlms)
  );

  always #5 clk = ~clk;

  localparam int TOTAL = 20000 + 1500000 + 6000000 + 200;

  initial begin
    repeat (TOTAL + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // analogue model state
  ra_t  p = '{g: 1.01, h2: 0.0063, h3: 0.0126};
  real  ph = 0.0;
  localparam int ALAT = 4;    // analogue latency = ADC_LATENCY default
  localparam int LAT  = 3;    // main path latency

  typedef struct {
    logic [2:0] c1;
    logic [3:0] c [4];
    real        vin;
    int         ideal2;   // 2 * ideal reconstruction (phase 1 reference)
  } smp_t;

  smp_t in_flight [$];   // converted, codes not yet delivered
  smp_t out_q [$];       // delivered, dout not yet out

  int n_upd = 0, n_gate = 0, n_dpos = 0, n_dneg = 0, n_sign = 0;
  int n_mode [3] = '{0, 0, 0};
  real err1, err2;
  int  nerr;

  // one sample: convert (with the dither sign the block asks for now),
  // deliver the codes of ALAT samples ago, check/measure the dout of LAT
  // samples ago
  task automatic one_sample(int phase, bit measure);
    smp_t s, d, o;
    int c1;
    real r, y;
    s.vin = 2000.0 * $sin(ph);
    ph += 2.0 * 3.14159265358979 * 0.00390625 * 1.0137;
    c1 = stage1_code(s.vin);
    r = stage1_residue(s.vin, c1);
    y = ra(p, r, dither);
    backend(y, s.c);
    s.c1 = 3'(c1);
    s.ideal2 = 2 * (512 * c1 - 1792 + 2048 + (dither ? -128 : 128))
             + int'(2.0 * backend_value(s.c)) + 1;
    if (dither) n_dpos++; else n_dneg++;
    in_flight.push_back(s);
    if (in_flight.size() > ALAT) begin
      d = in_flight.pop_front();
      code1 = d.c1;
      foreach (code_be[k]) code_be[k] = d.c[k];
      out_q.push_back(d);
    end
    @(negedge clk);
    if (upd) n_upd++;
    if (gate) n_gate++;
    if (ine_en && alpha_mean[C_A3] != 0 && dres_cal < -data_t'(64 * 256)) n_sign++;
    if (out_q.size() >= LAT) begin
      int e, ei;
      o = out_q.pop_front();
      if (phase == 1) begin
        e = o.ideal2 >>> 1;
        e = (e < 0) ? 0 : (e > 4095) ? 4095 : e;
        check(int'(dout) == e, $sformatf("phase 1 dout %0d exp %0d", dout, e));
      end
      if (measure) begin
        real ev;
        ei = int'($floor(o.vin + 2048.0 + 0.5));
        ev = real'(int'(dout)) - ei;
        err1 += ev;
        err2 += ev * ev;
        nerr++;
      end
    end
  endtask

  task automatic phase_run(int phase, int n, output real rms);
    err1 = 0.0; err2 = 0.0; nerr = 0;
    for (int t = 0; t < n; t++) begin
      n_mode[phase-1]++;
      one_sample(phase, t >= n - 32768);
    end
    // rms of the error about its mean (an offset is not a conversion error)
    rms = $sqrt(err2 / nerr - (err1 / nerr) * (err1 / nerr));
  endtask

  initial begin
    real rms_off, rms_ige, rms_ine;
    code1 = '0;
    foreach (code_be[k]) code_be[k] = 4'd0;
    foreach (a1_later[k]) a1_later[k] = coef_t'(1 << C_FRAC);
    mu1 = 6'd24; mu2 = 6'd24; mu3 = 6'd28; th = 11'd128;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    en = 1;

    ige_en = 0; ine_en = 0;
    phase_run(1, 20000, rms_off);
    ige_en = 1;
    phase_run(2, 1500000, rms_ige);
    $display("alpha1 mean after gain-only phase %f (1/g = %f)",
             alpha_mean[C_A1_S2] / 1048576.0, 1.0 / p.g);
    ine_en = 1;
    phase_run(3, 6000000, rms_ine);
    $display("means: alpha1 %f alpha2 %f alpha3 %f",
             alpha_mean[C_A1_S2] / 1048576.0, alpha_mean[C_A2] / 1048576.0,
             alpha_mean[C_A3] / 1048576.0);
    $display("rms error [LSB]: off %f, gain only %f, gain+nonlinearity %f",
             rms_off, rms_ige, rms_ine);
    $display("events: upd %0d gate %0d dither+ %0d dither- %0d sign %0d modes %0d/%0d/%0d",
             n_upd, n_gate, n_dpos, n_dneg, n_sign, n_mode[0], n_mode[1], n_mode[2]);

    check(rms_ige < rms_off, "gain calibration lowers the error");
    check(rms_ine < rms_ige, "nonlinearity calibration lowers the error further");
    check(rms_ine < 0.6, "final error close to quantisation noise");
    check(alpha_mean[C_A1_S2] > coef_t'(0.985 * 1048576.0) &&
          alpha_mean[C_A1_S2] < coef_t'(0.995 * 1048576.0), "alpha1 near 1/g");
    check(alpha_mean[C_A2] < 0 && alpha_mean[C_A3] < 0, "alpha2, alpha3 sign");
    check(n_upd > 1000, "window updates happened");
    check(n_gate > 0, "gated updates happened");
    check(n_dpos > 0 && n_dneg > 0, "both dither signs");
    check(n_sign > 0, "HD3 sign path used");
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "all three modes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
