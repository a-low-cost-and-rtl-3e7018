// tb_coef_mean: drives random coefficient streams (with gaps in en) into
// coef_mean with a 16-sample window and checks
// - upd_o is high exactly on every 16th enabled sample
// - after each window mean_o equals floor(sum/16) of that window, computed
//   here with 64-bit integers
// - mean_o keeps the nominal reset values until the first window ends
module tb_coef_mean;
  import calib_pkg::*;
  localparam int L = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  coef_t cin [N_COEF], mo [N_COEF];
  logic upd;

  coef_mean #(.LOG2_N(L)) dut (.clk, .rst_n, .en, .coef_in(cin), .mean_o(mo), .upd_o(upd));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  longint acc [N_COEF];
  int n = 0, windows = 0;

  initial begin
    foreach (cin[i]) cin[i] = '0;
    foreach (acc[i]) acc[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (mo[i]) check(mo[i] == ((i < 4) ? coef_t'(1 << C_FRAC) : coef_t'(0)), "reset value");
    for (int t = 0; t < 1500; t++) begin
      en = ($urandom_range(0, 3) != 0);
      foreach (cin[i]) cin[i] = coef_t'($urandom_range(0, 1 << 22)) - coef_t'(1 << 21)
                                 + ((i < 4) ? coef_t'(1 << C_FRAC) : coef_t'(0));
      #1;
      check(upd == (en && (n % 16 == 15)), $sformatf("upd at sample %0d", n));
      @(negedge clk);
      if (en) begin
        foreach (acc[i]) acc[i] += longint'(cin[i]);
        n++;
        if (n % 16 == 0) begin
          windows++;
          foreach (mo[i]) begin
            check(longint'(mo[i]) == (acc[i] >>> L),
                  $sformatf("mean %0d: got %0d exp %0d", i, mo[i], acc[i] >>> L));
            acc[i] = 0;
          end
        end
      end
    end
    check(windows > 50, "enough windows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
