// dpd_pkg: types and constants shared by the memory-polynomial DPD datapath.
//
// Samples are complex baseband values with 16-bit signed I and Q in Q1.15,
// matching the two 16-bit IQ samples per clock that the fabric exchanges with
// the RF data converters. On a 32-bit AXI stream word one sample is packed as
// {Q, I}, I in bits [15:0]. The fixed-point formats of the predistorter
// (magnitude Q1.15 unsigned, powers Q5.15 unsigned, coefficients Q3.15
// signed) are choices of this design; the model order P = 4 and memory depth
// M = 3 are defaults of this design as well (see README).
package dpd_pkg;

  localparam int unsigned SAMPLE_W = 16;   // I or Q width
  localparam int unsigned FRAC     = 15;   // fraction bits of samples, magnitudes and powers
  localparam int unsigned MAG_W    = 16;   // |x| unsigned, Q1.15 (|x| < sqrt(2))
  localparam int unsigned POW_W    = 20;   // |x|^p unsigned, Q5.15
  localparam int unsigned BASIS_W  = 22;   // x|x|^p signed, Q7.15
  localparam int unsigned COEF_W   = 18;   // d_pm real/imag signed, Q3.15
  localparam int unsigned COEF_FRAC = 15;
  localparam int unsigned ACC_W    = 48;   // accumulator of the coefficient products

  // Struct fields are plain bit vectors; arithmetic casts them with $signed.

  // One complex sample.
  typedef struct packed {
    logic [SAMPLE_W-1:0] q;
    logic [SAMPLE_W-1:0] i;
  } iq_t;

  // One complex coefficient.
  typedef struct packed {
    logic [COEF_W-1:0] im;
    logic [COEF_W-1:0] re;
  } coef_t;

  // One complex basis value x(n)|x(n)|^p.
  typedef struct packed {
    logic [BASIS_W-1:0] q;
    logic [BASIS_W-1:0] i;
  } basis_t;

  // Round an accumulator with COEF_FRAC+FRAC fraction bits down to a Q1.15
  // sample, rounding half up and saturating to the 16-bit range.
  function automatic logic signed [SAMPLE_W-1:0] round_sat(input logic signed [ACC_W-1:0] acc);
    logic signed [ACC_W-1:0] r;
    r = (acc + (ACC_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > ACC_W'(32767))       return 16'sh7FFF;
    else if (r < -ACC_W'(32768)) return 16'sh8000;
    else                         return r[SAMPLE_W-1:0];
  endfunction

endpackage
