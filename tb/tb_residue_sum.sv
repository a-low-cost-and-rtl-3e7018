// tb_residue_sum: random weights and random stage codes; checks that res_o
// is, one clock after the codes, the sum over stages 2..5 of the offset plus
// the weights of the set code bits (bits above a stage's width ignored),
// and that res_o holds while en is low.
module tb_residue_sum;
  import calib_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [MAXB-1:0] code [N_BE];
  data_t w_bit [N_BE][MAXB], w_off [N_BE], res;

  residue_sum dut (.clk, .rst_n, .en, .code, .w_bit, .w_off, .res_o(res));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NBS [4] = '{3, 3, 3, 4};

  initial begin
    longint exp_v;
    foreach (code[s]) code[s] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (t % 50 == 0)
        for (int s = 0; s < 4; s++) begin
          w_off[s] = data_t'(int'($urandom_range(0, 200000)) - 100000);
          for (int j = 0; j < MAXB; j++) w_bit[s][j] = data_t'($urandom_range(0, 140000));
        end
      foreach (code[s]) code[s] = 4'($urandom);
      en = ($urandom_range(0, 4) != 0);
      exp_v = 0;
      for (int s = 0; s < 4; s++) begin
        exp_v += longint'(w_off[s]);
        for (int j = 0; j < NBS[s]; j++)
          if (code[s][j]) exp_v += longint'(w_bit[s][j]);
      end
      begin
        longint prev;
        prev = longint'(res);
        @(negedge clk);
        checks++;
        if (en ? (longint'(res) != exp_v) : (longint'(res) != prev)) begin
          failures++;
          $display("t=%0d en=%0d got %0d exp %0d", t, en, res, en ? exp_v : prev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
