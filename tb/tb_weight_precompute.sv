// tb_weight_precompute: loads random averaged gains (0.97..1.03) and checks
// - reset weights are the nominal stage weights (128/32/8/1 LSB steps)
// - weights change only on upd
// - after upd, p-weights equal W * a2*a3*...*a(s+2) and q-weights
//   W * a3*...*a(s+2), both exactly as 64-bit rounded integer products and
//   within 0.5 LSB of the product computed in floating point
module tb_weight_precompute;
  import calib_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, upd = 0;
  coef_t a [N_BE];
  data_t p_bit [N_BE][MAXB], p_off [N_BE], q_bit [N_BE][MAXB], q_off [N_BE];

  weight_precompute dut (.clk, .rst_n, .upd, .a1_mean(a), .p_bit, .p_off, .q_bit, .q_off);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
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

  localparam int STEP [4] = '{128, 32, 8, 1};
  localparam int NBS  [4] = '{3, 3, 3, 4};

  function automatic longint rmul(longint x, longint y);
    return (x * y + (longint'(1) << 19)) >>> 20;
  endfunction

  function automatic longint wnom(int s, int j);   // j = MAXB: offset
    if (j == MAXB) return -(longint'((1 << NBS[s]) - 1) * STEP[s] * 256) / 2;
    if (j >= NBS[s]) return 0;
    return longint'(STEP[s]) * (1 << j) * 256;
  endfunction

  task automatic check_all(longint g [4], longint h [4], real gr [4], real hr [4], string tag);
    for (int s = 0; s < 4; s++)
      for (int j = 0; j <= MAXB; j++) begin
        longint pe, qe, pg, qg;
        pe = rmul(g[s], wnom(s, j));
        qe = rmul(h[s], wnom(s, j));
        pg = (j == MAXB) ? longint'(p_off[s]) : longint'(p_bit[s][j]);
        qg = (j == MAXB) ? longint'(q_off[s]) : longint'(q_bit[s][j]);
        check(pg == pe && qg == qe,
              $sformatf("%s s=%0d j=%0d p %0d/%0d q %0d/%0d", tag, s, j, pg, pe, qg, qe));
        check((pg - gr[s] * wnom(s, j)) < 0.5 * 256 && (gr[s] * wnom(s, j) - pg) < 0.5 * 256 &&
              (qg - hr[s] * wnom(s, j)) < 0.5 * 256 && (hr[s] * wnom(s, j) - qg) < 0.5 * 256,
              $sformatf("%s s=%0d j=%0d float", tag, s, j));
      end
  endtask

  initial begin
    longint g [4], h [4];
    real gr [4], hr [4];
    foreach (a[i]) a[i] = coef_t'(1 << 20);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (g[i]) begin g[i] = 1 << 20; h[i] = 1 << 20; gr[i] = 1.0; hr[i] = 1.0; end
    check_all(g, h, gr, hr, "reset");
    for (int trial = 0; trial < 30; trial++) begin
      foreach (a[i]) a[i] = coef_t'((1 << 20) + int'($urandom_range(0, 62914)) - 31457);
      repeat (3) @(negedge clk);
      check_all(g, h, gr, hr, "hold");          // no upd: unchanged
      upd = 1;
      @(negedge clk);
      upd = 0;
      g[0] = a[0]; h[0] = 1 << 20; h[1] = a[1];
      for (int s = 1; s < 4; s++) g[s] = rmul(g[s-1], a[s]);
      for (int s = 2; s < 4; s++) h[s] = rmul(h[s-1], a[s]);
      gr[0] = a[0] / 1048576.0; hr[0] = 1.0;
      for (int s = 1; s < 4; s++) begin
        gr[s] = gr[s-1] * a[s] / 1048576.0;
        hr[s] = hr[s-1] * a[s] / 1048576.0;
      end
      check_all(g, h, gr, hr, "upd");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
