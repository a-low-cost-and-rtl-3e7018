// ine_correction: LUT-based correction of the inter-stage nonlinearity of
// the first residue amplifier:
//   D_RES_cal = a1*D_RES + a2*LUT2(|a1*D_RES|) + sign * a3*LUT3(|a1*D_RES|)
// with a1..a3 the averaged coefficients. The HD2 error is even and the HD3
// error odd in the residue, so both tables are indexed by the magnitude
// only: the four MSBs of |a1*D_RES| index the 16-entry HD3 table, the top
// three of them the 8-entry HD2 table, and the sign of a1*D_RES negates the
// HD3 term. The gain-corrected residue a1*D_RES arrives from residue_sum.
//
// Main-clock path: absolute value and MSB pick, two multiplexers, one
// conditional negation and two adders, registered once: cal_o is valid one
// clock after res_i when en is high. The tables reload on upd (divided
// clock domain). The structure follows the document; the magnitude range
// that the MSBs cover (512 LSB, the input range of stage 2) is this
// design's choice.
module ine_correction
  import calib_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  upd,          // divided-clock enable
  input  coef_t a2_mean,      // averaged HD2 coefficient
  input  coef_t a3_mean,      // averaged HD3 coefficient
  input  data_t res_i,        // a1 * D_RES
  output data_t cal_o         // D_RES_cal
);
  logic [LUT3_IDX-1:0] msb;
  logic                sgn;
  data_t               d_hd2, lut3, d_hd3;

  assign msb = mag_msbs(res_i);
  assign sgn = res_i[DW-1];

  ine_lut #(.IDX(LUT2_IDX), .POW(2)) u_lut2 (
    .clk, .rst_n, .upd, .coef(a2_mean),
    .idx(msb[LUT3_IDX-1 -: LUT2_IDX]), .val(d_hd2)
  );

  ine_lut #(.IDX(LUT3_IDX), .POW(3)) u_lut3 (
    .clk, .rst_n, .upd, .coef(a3_mean),
    .idx(msb), .val(lut3)
  );

  assign d_hd3 = sgn ? -lut3 : lut3;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  cal_o <= '0;
    else if (en) cal_o <= res_i + d_hd2 + d_hd3;
endmodule
