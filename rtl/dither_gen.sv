// dither_gen: pseudo-random sign D_d of the calibration dither.
//
// A 31-bit maximal-length Fibonacci LFSR (taps 31 and 28) advances once per
// sample; its output bit is the dither sign sent to the analogue dither DAC
// (dither_o, 1 = +dither). The digital side needs the sign of the same sample
// when its stage codes come back, so the sign is also delayed by LATENCY
// cycles (the pipeline latency of the analogue stages) and presented on
// dither_aligned_o. The document only requires a dither sign uncorrelated
// with the input; the LFSR, its seed and the delay line are this design's
// choices. The register is reset to SEED (must be non-zero).
module dither_gen #(
  parameter int          LATENCY = 4,
  parameter logic [30:0] SEED    = 31'h2A5F_1C3B
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,                // advance one step per sample
  output logic dither_o,          // sign for the sample being converted now
  output logic dither_aligned_o   // sign of the sample whose codes arrive now
);
  logic [30:0]      lfsr;
  logic [LATENCY:0] dly;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  lfsr <= SEED;
    else if (en) lfsr <= {lfsr[29:0], lfsr[30] ^ lfsr[27]};

  assign dither_o = lfsr[30];

  always_comb dly[0] = dither_o;
  for (genvar i = 0; i < LATENCY; i++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)  dly[i+1] <= 1'b0;
      else if (en) dly[i+1] <= dly[i];
  end
  assign dither_aligned_o = dly[LATENCY];

  initial assert (SEED != '0) else $error("dither_gen: SEED must be non-zero");
endmodule
