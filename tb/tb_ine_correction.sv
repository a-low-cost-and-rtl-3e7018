// tb_ine_correction: loads random averaged HD2/HD3 coefficients and feeds
// random residues (including values beyond the 512-LSB magnitude range).
// The expected D_RES_cal is computed here from the definition:
//   i4 = min(floor(|x| / 32 LSB), 15), i3 = floor(i4 / 2)
//   cal = x + round(a2*i3^2) + sign(x) * round(a3*i4^3)
// and compared one clock after the residue is presented.
module tb_ine_correction;
  import calib_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, upd = 0;
  coef_t a2, a3;
  data_t x, cal;

  ine_correction dut (.clk, .rst_n, .en, .upd, .a2_mean(a2), .a3_mean(a3), .res_i(x), .cal_o(cal));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ent(longint c, longint ip);
    return (c * ip + (longint'(1) << 11)) >>> 12;
  endfunction

  initial begin
    longint e, mag, i4, i3, h3;
    a2 = '0; a3 = '0; x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      @(negedge clk);
      a2 = coef_t'(int'($urandom_range(0, 400000)) - 200000);
      a3 = coef_t'(int'($urandom_range(0, 8000)) - 4000);
      upd = 1;
      @(negedge clk);
      upd = 0;
      en = 1;
      for (int t = 0; t < 400; t++) begin
        x = data_t'(int'($urandom_range(0, 2 * 700 * 256)) - 700 * 256);
        if (t == 0) x = '0;
        if (t == 1) x = data_t'(-(511 * 256));
        mag = (x < 0) ? -longint'(x) : longint'(x);
        i4 = mag / (32 * 256);
        if (i4 > 15) i4 = 15;
        i3 = i4 / 2;
        h3 = ent(longint'(a3), i4 * i4 * i4);
        e = longint'(x) + ent(longint'(a2), i3 * i3) + ((x < 0) ? -h3 : h3);
        @(negedge clk);
        checks++;
        if (longint'(cal) != e) begin
          failures++;
          $display("x=%0d got %0d exp %0d", x, cal, e);
        end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
