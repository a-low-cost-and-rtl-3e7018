// tb_ine_estimator: two checks of the dither-based gated LMS estimator.
//
// Part 1, exact: random back-end codes, random dither and random weights;
// a cycle model written here (register by register, 64-bit integers)
// predicts alpha1..alpha3, D_LMS and the gate every clock, with large step
// sizes so that all three accumulators move.
// Part 2, convergence: the behavioural ADC model with a first amplifier 2 %
// too strong (gain error only, nonlinear estimation off) and a sine input.
// The mean of alpha1 over the last 400000 samples must be within 0.5 % of
// 1/1.02. The gain mode switch is also checked: with ige_en low alpha1
// returns to 1.0.
// Part 3, direction: with positive HD2 and HD3 in the amplifier and the
// nonlinear estimation on, alpha2 and alpha3 must turn negative and the
// gate must have fired.
module tb_ine_estimator;
  import calib_pkg::*;
  import adc_model_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [MAXB-1:0] code [N_BE];
  logic dither = 0, ige_en = 1, ine_en = 1, gate;
  data_t q_bit [N_BE][MAXB], q_off [N_BE], dlms;
  logic [5:0] mu1, mu2, mu3;
  logic [10:0] th;
  coef_t a1, a2, a3;

  ine_estimator dut (
    .clk, .rst_n, .en, .code, .dither, .q_bit, .q_off, .ige_en, .ine_en,
    .mu1_shift(mu1), .mu2_shift(mu2), .mu3_shift(mu3), .lms_th(th),
    .a1_o(a1), .a2_o(a2), .a3_o(a3), .dlms_o(dlms), .gate_o(gate)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1500000) @(posedge clk);
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

  localparam int NBS  [4] = '{3, 3, 3, 4};
  localparam int STEP [4] = '{128, 32, 8, 1};

  // ---------------- reference model state ----------------
  longint m_dres, m_x, m_dlms, m_acc [3];
  bit     m_dp [3];

  function automatic longint coefv(longint acc);
    return acc >>> 20;
  endfunction

  function automatic longint stepv(longint v, bit d, int mu);
    longint s;
    s = (v <<< 32) >>> mu;
    return d ? s : -s;
  endfunction

  task automatic model_reset();
    m_dres = 0; m_x = 0; m_dlms = 0;
    m_acc[0] = longint'(1) << 40; m_acc[1] = 0; m_acc[2] = 0;
    m_dp = '{0, 0, 0};
  endtask

  // one enabled clock edge
  task automatic model_step();
    longint n_dres, n_x, n_dlms, mag, i4, i3, tn, t3, dabs;
    bit g;
    n_dres = 0;
    for (int s = 0; s < 4; s++) begin
      n_dres += longint'(q_off[s]);
      for (int j = 0; j < NBS[s]; j++) if (code[s][j]) n_dres += longint'(q_bit[s][j]);
    end
    n_x = (coefv(m_acc[0]) * m_dres + (longint'(1) << 19)) >>> 20;
    mag = (m_x < 0) ? -m_x : m_x;
    i4 = mag >>> 13;
    if (i4 > 15) i4 = 15;
    i3 = i4 >>> 1;
    t3 = coefv(m_acc[2]) * i4 * i4 * i4;
    if (m_x < 0) t3 = -t3;
    tn = coefv(m_acc[1]) * i3 * i3 + t3 + 2048;
    n_dlms = m_x + (tn >>> 12) + (m_dp[1] ? -(128 * 256) : (128 * 256));
    dabs = (m_dlms < 0) ? -m_dlms : m_dlms;
    g = dabs > longint'(th) * 256;
    if (ige_en) m_acc[0] -= stepv(m_dlms, m_dp[2], mu1);
    else        m_acc[0] = longint'(1) << 40;
    if (!ine_en) begin
      m_acc[1] = 0; m_acc[2] = 0;
    end else if (g) begin
      m_acc[1] -= stepv(dabs, m_dp[2], mu2);
      m_acc[2] -= stepv(m_dlms, m_dp[2], mu3);
    end
    m_dlms = n_dlms;
    m_x = n_x;
    m_dres = n_dres;
    m_dp[2] = m_dp[1];
    m_dp[1] = m_dp[0];
    m_dp[0] = dither;
  endtask

  task automatic nominal_weights();
    for (int s = 0; s < 4; s++) begin
      q_off[s] = data_t'(-(((1 << NBS[s]) - 1) * STEP[s] * 256) / 2);
      for (int j = 0; j < MAXB; j++) q_bit[s][j] = (j < NBS[s]) ? data_t'(STEP[s] * (1 << j) * 256) : '0;
    end
  endtask

  initial begin
    ra_t p;
    real ph, vin, r, y, sum_a1;
    int c1, gates;
    logic [3:0] c [4];

    // ---------------- part 1 ----------------
    foreach (code[s]) code[s] = '0;
    nominal_weights();
    mu1 = 22; mu2 = 18; mu3 = 20; th = 11'd100;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model_reset();
    @(negedge clk);
    en = 1;
    for (int t = 0; t < 20000; t++) begin
      if (t % 1000 == 0)
        for (int s = 0; s < 4; s++) begin
          q_off[s] = data_t'(-(((1 << NBS[s]) - 1) * STEP[s] * 256) / 2 + int'($urandom_range(0, 200)) - 100);
          for (int j = 0; j < NBS[s]; j++)
            q_bit[s][j] = data_t'(STEP[s] * (1 << j) * 256 + int'($urandom_range(0, 200)) - 100);
        end
      foreach (code[s]) code[s] = (s == 3) ? 4'($urandom) : 4'($urandom_range(0, 7));
      dither = 1'($urandom);
      ige_en = (t % 5000) < 4900;
      ine_en = (t % 7000) < 6800;
      @(posedge clk);
      model_step();
      @(negedge clk);
      check(longint'(a1) == coefv(m_acc[0]) && longint'(a2) == coefv(m_acc[1]) &&
            longint'(a3) == coefv(m_acc[2]) && longint'(dlms) == m_dlms,
            $sformatf("t=%0d a1 %0d/%0d a2 %0d/%0d a3 %0d/%0d dlms %0d/%0d", t,
                      a1, coefv(m_acc[0]), a2, coefv(m_acc[1]), a3, coefv(m_acc[2]), dlms, m_dlms));
    end

    // ---------------- part 2 ----------------
    nominal_weights();
    ige_en = 1; ine_en = 0;
    mu1 = 23;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    p = '{g: 1.02, h2: 0.0, h3: 0.0};
    ph = 0.0; sum_a1 = 0.0;
    for (int t = 0; t < 700000; t++) begin
      vin = 1900.0 * $sin(ph);
      ph += 2.0 * 3.14159265358979 * 0.0123457;
      c1 = stage1_code(vin);
      r = stage1_residue(vin, c1);
      dither = 1'($urandom);
      y = ra(p, r, dither);
      backend(y, c);
      foreach (code[s]) code[s] = c[s];
      @(negedge clk);
      if (t >= 300000) sum_a1 += a1 / 1048576.0;
    end
    sum_a1 /= 400000.0;
    $display("alpha1 mean %f expected %f", sum_a1, 1.0 / 1.02);
    check(sum_a1 > (1.0 / 1.02) * 0.995 && sum_a1 < (1.0 / 1.02) * 1.005, "alpha1 convergence");
    ige_en = 0;
    repeat (2) @(negedge clk);
    check(a1 == coef_t'(1 << 20), "alpha1 held at 1.0 when ige_en is low");

    // ---------------- part 3 ----------------
    ige_en = 1; ine_en = 1;
    mu1 = 22; mu2 = 22; mu3 = 22; th = 11'd128;
    p = '{g: 1.0, h2: 0.02, h3: 0.04};
    gates = 0;
    for (int t = 0; t < 300000; t++) begin
      vin = 1900.0 * $sin(ph);
      ph += 2.0 * 3.14159265358979 * 0.0123457;
      c1 = stage1_code(vin);
      r = stage1_residue(vin, c1);
      dither = 1'($urandom);
      y = ra(p, r, dither);
      backend(y, c);
      foreach (code[s]) code[s] = c[s];
      @(negedge clk);
      if (gate) gates++;
    end
    $display("alpha2 %f alpha3 %f gates %0d", a2 / 1048576.0, a3 / 1048576.0, gates);
    check(gates > 1000, "gate fired");
    check(a2 < 0, "alpha2 negative");
    check(a3 < 0, "alpha3 negative");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
