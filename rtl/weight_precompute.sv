// weight_precompute: divided-clock-domain multipliers of the weight
// computation.
//
// In a conventional back end every stage output is multiplied by the
// product of the gain coefficients alpha1 of all residue amplifiers in front
// of it, in the main clock domain. Here those products are formed once per
// update period from the averaged coefficients and folded into the stage
// bit weights, so the main path only adds. Following the chain of the
// document's weight-computation figure:
//   G2 = a2, G3 = G2*a3, G4 = G3*a4, G5 = G4*a5
//   p_bit[s][j] = G(s+2) * W[s][j],  p_off[s] = G(s+2) * W_off[s]
// where a2..a5 are the means of alpha1 of stages 2..5 and W the nominal
// weights. The same is done without a2 (H2 = 1, H3 = a3, ...) to give the
// q_* weights used by the estimation path, which applies the current, not
// averaged, alpha1 of the first amplifier with its own multiplier (this
// second set is this design's choice).
//
// Timing: all output registers load when upd is high. Their inputs come
// from the mean registers, which also change only on upd, so the
// multipliers have a full update period (N cycles) to settle and can be
// constrained as an N-cycle multicycle path; the weights used in a window
// are those of the means of the window before. Reset loads nominal weights.
// Products are rounded to nearest.
module weight_precompute
  import calib_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  upd,                     // divided-clock enable
  input  coef_t a1_mean [N_BE],          // mean alpha1 of stages 2..5
  output data_t p_bit [N_BE][MAXB],      // main path weights
  output data_t p_off [N_BE],
  output data_t q_bit [N_BE][MAXB],      // estimation path weights
  output data_t q_off [N_BE]
);
  function automatic coef_t cmul(coef_t a, coef_t b);
    logic signed [2*CW-1:0] p;
    p = (2*CW)'(a) * (2*CW)'(b) + (2*CW)'(1 <<< (C_FRAC - 1));
    return coef_t'(p >>> C_FRAC);
  endfunction

  function automatic data_t wmul(coef_t g, data_t w);
    logic signed [CW+DW-1:0] p;
    p = (CW+DW)'(g) * (CW+DW)'(w) + (CW+DW)'(1 <<< (C_FRAC - 1));
    return data_t'(p >>> C_FRAC);
  endfunction

  coef_t g [N_BE];   // products including the first amplifier
  coef_t h [N_BE];   // products excluding it

  always_comb begin
    g[0] = a1_mean[0];
    h[0] = COEF_ONE;
    for (int s = 1; s < N_BE; s++) begin
      g[s] = cmul(g[s-1], a1_mean[s]);
      h[s] = (s == 1) ? a1_mean[1] : cmul(h[s-1], a1_mean[s]);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int s = 0; s < N_BE; s++) begin
        p_off[s] <= nom_offset(s);
        q_off[s] <= nom_offset(s);
        for (int j = 0; j < MAXB; j++) begin
          p_bit[s][j] <= nom_bit_weight(s, j);
          q_bit[s][j] <= nom_bit_weight(s, j);
        end
      end
    end else if (upd) begin
      for (int s = 0; s < N_BE; s++) begin
        p_off[s] <= wmul(g[s], nom_offset(s));
        q_off[s] <= wmul(h[s], nom_offset(s));
        for (int j = 0; j < MAXB; j++) begin
          p_bit[s][j] <= wmul(g[s], nom_bit_weight(s, j));
          q_bit[s][j] <= wmul(h[s], nom_bit_weight(s, j));
        end
      end
    end
endmodule
