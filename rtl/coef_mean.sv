// coef_mean: block averages of the calibration coefficients.
//
// The LMS loops produce coefficients that wander slightly around their
// converged values. The low-latency correction path uses instead the mean of
// each coefficient over the last N = 2^LOG2_N samples, refreshed once every N
// samples, as the document describes. This block sums each input coefficient
// over a window of N enabled cycles and, on the last cycle of the window,
// loads sum/N (arithmetic shift, rounding toward minus infinity) into mean_o.
//
// upd_o is high during the last enabled cycle of each window, i.e. on the
// same clock edge at which mean_o takes its new value. It is the enable of
// the "divided clock domain": everything clocked with upd_o runs once per N
// samples. Reset loads every mean with its nominal value (gains 1.0,
// nonlinear terms 0). The window length is not given in the document; the
// default N = 1024 is this design's choice.
module coef_mean
  import calib_pkg::*;
#(
  parameter int LOG2_N = 10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,                  // one sample
  input  coef_t coef_in [N_COEF],    // current coefficients
  output coef_t mean_o  [N_COEF],    // mean of the last complete window
  output logic  upd_o                // window ends on this cycle
);
  localparam int SW = CW + LOG2_N;
  typedef logic signed [SW-1:0] sum_t;

  logic [LOG2_N-1:0] cnt;
  sum_t              sum [N_COEF];

  assign upd_o = en && (cnt == '1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  cnt <= '0;
    else if (en) cnt <= cnt + 1'b1;

  for (genvar i = 0; i < N_COEF; i++) begin : g_coef
    sum_t total;
    assign total = sum[i] + sum_t'(coef_in[i]);

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        sum[i]    <= '0;
        mean_o[i] <= coef_init(i);
      end else if (en) begin
        if (upd_o) begin
          sum[i]    <= '0;
          mean_o[i] <= coef_t'(total >>> LOG2_N);
        end else begin
          sum[i]    <= total;
        end
      end
  end
endmodule
