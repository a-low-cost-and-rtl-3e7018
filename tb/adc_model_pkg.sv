// adc_model_pkg: behavioural model of the analogue part of the 12-bit
// pipelined ADC, used only by the testbenches.
//   stage 1 : 3-bit quantiser, step 512 LSB, residue r = vin - (c1-3.5)*512
//   RA 1    : u = r + D_d*128 (dither), y = g*u + h2*u^2/512 + h3*u^3/512^2
//   stages 2..5 : ideal 3b, 3b, 3b, 4b quantisers with steps 128, 32, 8 and
//             1 LSB and gain 4 between them (later amplifiers ideal)
// All values are in LSBs of the 12-bit output, signed around mid-scale.
package adc_model_pkg;

  typedef struct {
    real g;    // gain of the first amplifier, relative to 4
    real h2;   // second-order coefficient
    real h3;   // third-order coefficient
  } ra_t;

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int stage1_code(real vin);
    return clampi(int'($floor(vin / 512.0)) + 4, 0, 7);
  endfunction

  function automatic real stage1_residue(real vin, int c1);
    return vin - (c1 - 3.5) * 512.0;
  endfunction

  function automatic real ra(ra_t p, real r, bit d);
    real u;
    u = r + (d ? 128.0 : -128.0);
    return p.g * u + p.h2 * u * u / 512.0 + p.h3 * u * u * u / (512.0 * 512.0);
  endfunction

  // codes of stages 2..5 for an amplified residue y
  task automatic backend(real y, output logic [3:0] c [4]);
    real e;
    int  k;
    real step [3] = '{128.0, 32.0, 8.0};
    e = y;
    for (int s = 0; s < 3; s++) begin
      k = clampi(int'($floor(e / step[s])) + 4, 0, 7);
      c[s] = 4'(k);
      e = e - (k - 3.5) * step[s];
    end
    k = clampi(int'($floor(e)) + 8, 0, 15);
    c[3] = 4'(k);
  endtask

  // value of the back-end codes with ideal weights (in LSB)
  function automatic real backend_value(logic [3:0] c [4]);
    return (c[0] - 3.5) * 128.0 + (c[1] - 3.5) * 32.0 + (c[2] - 3.5) * 8.0 + (c[3] - 7.5);
  endfunction

endpackage
