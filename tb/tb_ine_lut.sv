// tb_ine_lut: checks both table shapes (8 entries of coef*i^2 and 16 of
// coef*i^3). After reset every entry reads 0; after each upd with a random
// coefficient every index reads round(coef * i^p / 2^(C_FRAC-D_FRAC));
// without upd a changed coefficient does not alter the table.
module tb_ine_lut;
  import calib_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, upd = 0;
  coef_t c2, c3;
  logic [2:0] i3;
  logic [3:0] i4;
  data_t v2, v3;

  ine_lut #(.IDX(3), .POW(2)) dut2 (.clk, .rst_n, .upd, .coef(c2), .idx(i3), .val(v2));
  ine_lut #(.IDX(4), .POW(3)) dut3 (.clk, .rst_n, .upd, .coef(c3), .idx(i4), .val(v3));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_entry(longint c, int i, int p);
    longint ip = 1;
    for (int k = 0; k < p; k++) ip *= i;
    return (c * ip + (longint'(1) << 11)) >>> 12;
  endfunction

  task automatic scan(longint e2, longint e3, string tag);
    for (int i = 0; i < 16; i++) begin
      i3 = 3'(i);
      i4 = 4'(i);
      #1;
      checks++;
      if (i < 8 && longint'(v2) != ref_entry(e2, i, 2)) begin
        failures++;
        $display("%s HD2 i=%0d got %0d exp %0d", tag, i, v2, ref_entry(e2, i, 2));
      end
      checks++;
      if (longint'(v3) != ref_entry(e3, i, 3)) begin
        failures++;
        $display("%s HD3 i=%0d got %0d exp %0d", tag, i, v3, ref_entry(e3, i, 3));
      end
    end
  endtask

  initial begin
    longint k2, k3;
    c2 = '0; c3 = '0; i3 = '0; i4 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    k2 = 0; k3 = 0;
    scan(0, 0, "reset");
    for (int trial = 0; trial < 40; trial++) begin
      c2 = coef_t'(int'($urandom_range(0, 400000)) - 200000);
      c3 = coef_t'(int'($urandom_range(0, 8000)) - 4000);
      @(negedge clk);
      scan(k2, k3, "hold");
      @(negedge clk);
      upd = 1;
      @(negedge clk);
      upd = 0;
      k2 = longint'(c2); k3 = longint'(c3);
      scan(k2, k3, "upd");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
