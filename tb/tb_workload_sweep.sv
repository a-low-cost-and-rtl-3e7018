// tb_workload_sweep: the evaluation workloads of the calibration, run on the
// top at its default parameters with the behavioural ADC model.
//   - distortion sweep: HD2 at -60, -45 and -30 dB with HD3 at -60 dB, then
//     HD3 at -45 and -30 dB with HD2 at -60 dB; gain error 1 %;
//   - four Monte Carlo draws: HD2 and HD3 normal around -50 dB (sigma 3 dB),
//     amplifier gain normal around 1 (sigma 1 %), amplifier offset and the
//     seven first-stage comparator offsets normal around 0 (sigma 2 mV,
//     i.e. 6.8 LSB of a 1.2 V peak-to-peak, 12-bit converter).
// HD levels are defined for a sine filling the +-512 LSB amplifier range:
// h2 = 2*10^(HD2/20), h3 = 4*10^(HD3/20) in the model of adc_model_pkg.
// The input is a 2000 LSB sine. For every case the design is reset, runs
// 20k samples uncalibrated, 1.5 M samples with gain calibration only and 6 M
// more with gain and nonlinearity calibration; the rms error of dout (mean
// removed) against the ideal conversion is measured over the last 32k
// samples of each phase and also printed as a signal-to-error ratio.
// Checks per case: full calibration beats no calibration, and adding the
// nonlinearity calibration never makes the gain-only result worse by more
// than 5 %; where HD2 or HD3 is -50 dB or stronger it must lower the error.
// (Gain-only calibration alone need not help: with a strong HD2 term and a
// small gain error its estimate is biased.)
module tb_workload_sweep;
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
    .lms_th(th), .dout, .dres_cal_o(dres_cal), .alpha1_o(alpha1),
    .alpha2_o(alpha2), .alpha3_o(alpha3), .alpha_mean_o(alpha_mean),
    .upd_o(upd), .gate_o(gate), .dlms_o(dlms)
  );

  always #5 clk = ~clk;

  localparam int NCASE = 9;
  localparam int N0 = 20000, N1 = 1500000, N2 = 6000000;

  initial begin
    repeat (NCASE * (N0 + N1 + N2 + 100)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  ra_t p;
  real ph = 0.0;
  localparam int ALAT = 4, LAT = 3;

  typedef struct {
    logic [2:0] c1;
    logic [3:0] c [4];
    real        vin;
  } smp_t;
  smp_t in_flight [$], out_q [$];
  real err1, err2;
  int nerr;

  task automatic one_sample(bit measure);
    smp_t s, d, o;
    int c1;
    s.vin = 2000.0 * $sin(ph);
    ph += 2.0 * 3.14159265358979 * 0.00390625 * 1.0137;
    c1 = code1_of(s.vin);
    backend(ra(p, stage1_residue(s.vin, c1) + ra_off, dither), s.c);
    s.c1 = 3'(c1);
    in_flight.push_back(s);
    if (in_flight.size() > ALAT) begin
      d = in_flight.pop_front();
      code1 = d.c1;
      foreach (code_be[k]) code_be[k] = d.c[k];
      out_q.push_back(d);
    end
    @(negedge clk);
    if (out_q.size() >= LAT) begin
      o = out_q.pop_front();
      if (measure) begin
        real ev;
        ev = real'(int'(dout)) - $floor(o.vin + 2048.0 + 0.5);
        err1 += ev;
        err2 += ev * ev;
        nerr++;
      end
    end
  endtask

  real cmp_off [7];   // first-stage comparator offsets, LSB
  real ra_off;        // amplifier input offset, LSB

  function automatic int code1_of(real vin);
    int c = 0;
    for (int k = 0; k < 7; k++)
      if (vin >= (k - 3) * 512.0 + cmp_off[k]) c++;
    return c;
  endfunction

  task automatic run(int n, output real rms);
    err1 = 0.0; err2 = 0.0; nerr = 0;
    for (int t = 0; t < n; t++) one_sample(t >= n - 32768);
    rms = $sqrt(err2 / nerr - (err1 / nerr) * (err1 / nerr));
  endtask

  // standard normal draw (Box-Muller)
  function automatic real nrand();
    real u1, u2;
    u1 = ($urandom_range(1, 1000000) / 1000000.0);
    u2 = ($urandom_range(0, 1000000) / 1000000.0);
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  function automatic real snr_db(real rms);
    return 20.0 * $log10(2000.0 / $sqrt(2.0) / rms);
  endfunction

  initial begin
    real g [NCASE], hd2 [NCASE], hd3 [NCASE], off [NCASE][8], r0, r1, r2;
    bit  neg2 [NCASE];
    string name [NCASE];
    g = '{1.01, 1.01, 1.01, 1.01, 1.01, 0, 0, 0, 0};
    hd2 = '{-60.0, -45.0, -30.0, -60.0, -60.0, 0, 0, 0, 0};
    hd3 = '{-60.0, -60.0, -60.0, -45.0, -30.0, 0, 0, 0, 0};
    name = '{"HD2 -60 dB", "HD2 -45 dB", "HD2 -30 dB", "HD3 -45 dB", "HD3 -30 dB",
             "MC draw 1", "MC draw 2", "MC draw 3", "MC draw 4"};
    foreach (neg2[k]) neg2[k] = 0;
    foreach (off[k, j]) off[k][j] = 0.0;
    for (int k = 5; k < NCASE; k++) begin
      g[k] = 1.0 + 0.01 * nrand();
      hd2[k] = -50.0 + 3.0 * nrand();
      hd3[k] = -50.0 + 3.0 * nrand();
      neg2[k] = 1'($urandom);
      foreach (off[k][j]) off[k][j] = 6.83 * nrand();
    end
    code1 = '0;
    foreach (code_be[k]) code_be[k] = 4'd0;
    foreach (a1_later[k]) a1_later[k] = coef_t'(1 << C_FRAC);
    mu1 = 6'd24; mu2 = 6'd24; mu3 = 6'd28; th = 11'd128;
    $display("case         gain    HD2(dB) HD3(dB)  rms off (SER)    gain only (SER)   gain+INE (SER)   alpha1    alpha2    alpha3");
    for (int k = 0; k < NCASE; k++) begin
      p.g  = g[k];
      p.h2 = (neg2[k] ? -2.0 : 2.0) * $pow(10.0, hd2[k] / 20.0);
      p.h3 = 4.0 * $pow(10.0, hd3[k] / 20.0);
      foreach (cmp_off[j]) cmp_off[j] = off[k][j];
      ra_off = off[k][7];
      in_flight.delete();
      out_q.delete();
      rst_n = 0; en = 0; ige_en = 0; ine_en = 0;
      repeat (2) @(negedge clk);
      rst_n = 1; en = 1;
      run(N0, r0);
      ige_en = 1;
      run(N1, r1);
      ine_en = 1;
      run(N2, r2);
      $display("%-11s  %6.4f  %6.1f  %6.1f   %6.3f (%4.1f)   %6.3f (%4.1f)    %6.3f (%4.1f)   %8.5f  %8.5f  %8.5f",
               name[k], g[k], hd2[k], hd3[k], r0, snr_db(r0), r1, snr_db(r1), r2, snr_db(r2),
               alpha_mean[C_A1_S2] / 1048576.0, alpha_mean[C_A2] / 1048576.0,
               alpha_mean[C_A3] / 1048576.0);
      check(r2 < r0, $sformatf("%s: calibration lowers the error", name[k]));
      check(r2 < 1.05 * r1, $sformatf("%s: nonlinearity calibration does not degrade", name[k]));
      if (hd2[k] >= -50.0 || hd3[k] >= -50.0)
        check(r2 < r1, $sformatf("%s: nonlinearity calibration lowers the error", name[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
