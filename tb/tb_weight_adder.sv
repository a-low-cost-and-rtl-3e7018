// tb_weight_adder: exhaustive check of the stage weight adder for a 3-bit
// and a 4-bit stage with random weights. The expected value is formed as
// w_off + code * (weight of a unit step) style sums computed bit by bit in
// plain integer arithmetic.
module tb_weight_adder;
  import calib_pkg::*;
  int checks = 0, failures = 0;

  logic [2:0] code3;
  logic [3:0] code4;
  data_t w3 [3], w4 [4], off3, off4, s3, s4;

  weight_adder #(.NB(3)) dut3 (.code(code3), .w_bit(w3), .w_off(off3), .sum(s3));
  weight_adder #(.NB(4)) dut4 (.code(code4), .w_bit(w4), .w_off(off4), .sum(s4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 20; trial++) begin
      longint e;
      off3 = data_t'($urandom_range(0, 200000)) - data_t'(100000);
      off4 = data_t'($urandom_range(0, 200000)) - data_t'(100000);
      foreach (w3[j]) w3[j] = data_t'($urandom_range(0, 150000));
      foreach (w4[j]) w4[j] = data_t'($urandom_range(0, 150000)) - data_t'(20000);
      for (int c = 0; c < 16; c++) begin
        code3 = 3'(c);
        code4 = 4'(c);
        #1;
        if (c < 8) begin
          e = longint'(off3);
          for (int j = 0; j < 3; j++) if (((c >> j) & 1) == 1) e += longint'(w3[j]);
          checks++;
          if (longint'(s3) != e) begin
            failures++;
            $display("NB=3 code=%0d got %0d exp %0d", c, s3, e);
          end
        end
        e = longint'(off4);
        for (int j = 0; j < 4; j++) if (((c >> j) & 1) == 1) e += longint'(w4[j]);
        checks++;
        if (longint'(s4) != e) begin
          failures++;
          $display("NB=4 code=%0d got %0d exp %0d", c, s4, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
