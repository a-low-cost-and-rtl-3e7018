// tb_dither_gen: checks the dither sign sequence of dither_gen.
// - the output obeys the recurrence of the 31-bit LFSR, o[t+31] = o[t] ^ o[t+3]
// - ones and zeros are balanced over 20000 samples (within 3 %)
// - dither_aligned_o equals dither_o of LATENCY enabled samples before
// - the sequence holds while en is low
module tb_dither_gen;
  localparam int LAT = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic d, da;

  dither_gen #(.LATENCY(LAT)) dut (.clk, .rst_n, .en, .dither_o(d), .dither_aligned_o(da));

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic hist [$];
  int ones = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1;
    for (int t = 0; t < 20000; t++) begin
      hist.push_back(d);
      if (d) ones++;
      if (t >= 31)
        check(hist[t] == (hist[t-31] ^ hist[t-28]), $sformatf("recurrence at %0d", t));
      if (t >= LAT)
        check(da == hist[t-LAT], $sformatf("aligned sign at %0d", t));
      // pause a few cycles now and then
      if (t % 997 == 500) begin
        logic hold_d, hold_da;
        hold_d = d; hold_da = da;
        en = 0;
        repeat (3) @(negedge clk);
        check(d == hold_d && da == hold_da, "hold while en low");
        en = 1;
      end
      @(negedge clk);
    end
    check(ones > 9700 && ones < 10300, $sformatf("balance %0d ones", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
