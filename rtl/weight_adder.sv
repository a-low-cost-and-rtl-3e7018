// weight_adder: digital weight of one pipeline stage's raw code.
//
// The stage's raw code bits select their (possibly pre-scaled) bit weights,
// and the selected weights are summed together with the stage's offset
// weight: out = w_off + sum_j code[j] * w_bit[j]. Because the weights arrive
// already multiplied by the gain coefficients (precomputed once per update
// period), this block contains only adders, which keeps the critical
// main-clock path free of multipliers as the document proposes.
// Purely combinational; NB is the raw code width (3 or 4 in this ADC). The
// offset term that centres the code on zero is this design's own choice of
// how the stage's mid-scale is removed.
module weight_adder
  import calib_pkg::*;
#(
  parameter int NB = 3
) (
  input  logic [NB-1:0] code,           // raw stage code D_raw
  input  data_t         w_bit [NB],     // weight of each code bit
  input  data_t         w_off,          // offset weight (constant term)
  output data_t         sum             // weighted stage output
);
  always_comb begin
    sum = w_off;
    for (int j = 0; j < NB; j++)
      if (code[j]) sum = sum + w_bit[j];
  end
endmodule
