// ine_lut: lookup table of one nonlinear correction term.
//
// Entry i holds coef * i^POW for i = 0 .. 2^IDX-1, converted from the
// coefficient format to the data format with rounding. Because the i^POW
// are fixed integers (0^2..7^2 for the HD2 table, 0^3..15^3 for the HD3
// table, as printed in the document's LUT figure) each entry is a constant
// multiplication, i.e. a shift-and-add network. The entries are
// precomputed in the divided clock domain: they load when upd is high,
// from the averaged coefficient that itself changes only on upd, so the
// multipliers may be treated as an N-cycle multicycle path. In the main
// clock domain only the 2^IDX-to-1 multiplexer remains: val is a
// combinational function of idx. Reset clears all entries.
module ine_lut
  import calib_pkg::*;
#(
  parameter int IDX = 3,   // index bits (MSBs of |alpha1*D_RES|)
  parameter int POW = 2    // power of the index stored in the table
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           upd,      // divided-clock enable
  input  coef_t          coef,     // averaged coefficient
  input  logic [IDX-1:0] idx,
  output data_t          val       // coef * idx^POW
);
  localparam int NE = 1 << IDX;
  localparam int PW = CW + POW * IDX + 2;
  typedef logic signed [PW-1:0] prod_t;

  data_t tbl [NE];

  function automatic data_t entry(coef_t c, int i);
    prod_t p;
    p = prod_t'(c) * prod_t'(i) ** POW + prod_t'(1 <<< (C_FRAC - D_FRAC - 1));
    return data_t'(p >>> (C_FRAC - D_FRAC));
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < NE; i++) tbl[i] <= '0;
    end else if (upd) begin
      for (int i = 0; i < NE; i++) tbl[i] <= entry(coef, i);
    end

  assign val = tbl[idx];
endmodule
