// residue_sum: main-clock-domain part of the precomputed weight computation.
//
// One weight_adder per back-end stage (ADC stages 2..5) turns the stage's
// raw code into its weighted value using pre-scaled weights, and an adder
// chain sums the four stage values. With weights from weight_precompute
// the result is alpha1*D_RES, the gain-corrected digital residue of the
// first stage, built from adders only as in the document's precomputation
// scheme. The sum is registered: res_o is valid one clock after code, when
// en was high. Codes are right-aligned in code[s]; bits above the stage's
// width are ignored.
module residue_sum
  import calib_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [MAXB-1:0] code  [N_BE],       // raw codes of stages 2..5
  input  data_t           w_bit [N_BE][MAXB], // pre-scaled weights
  input  data_t           w_off [N_BE],
  output data_t           res_o               // alpha1 * D_RES
);
  data_t stage_val [N_BE];

  for (genvar s = 0; s < N_BE; s++) begin : g_stage
    localparam int NB = STAGE_BITS[s];
    data_t wb [NB];
    for (genvar j = 0; j < NB; j++) begin : g_w
      assign wb[j] = w_bit[s][j];
    end
    weight_adder #(.NB(NB)) u_wadd (
      .code (code[s][NB-1:0]),
      .w_bit(wb),
      .w_off(w_off[s]),
      .sum  (stage_val[s])
    );
  end

  data_t total;
  always_comb begin
    total = '0;
    for (int s = 0; s < N_BE; s++) total = total + stage_val[s];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  res_o <= '0;
    else if (en) res_o <= total;
endmodule
