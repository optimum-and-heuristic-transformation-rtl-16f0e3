// lti_pkg: number formats and the one arithmetic primitive shared by all
// filter realisations.
//
// Samples and states are signed integers of DW bits. Coefficients are signed
// fixed-point numbers with CF fractional bits, wide enough that every
// coefficient used here (all are dyadic fractions with denominators of at most
// 2^35) is held exactly. A constant multiplication rounds its full product
// toward minus infinity back to DW bits (arithmetic shift right by CF); this
// is the only rounding anywhere, so sums are exact and their order does not
// change a result. The word lengths are this design's choice: the source
// analysis treats arithmetic as exact and leaves word length to simulation.
//
// Timing model (shared by every module): one clock cycle is one adder delay,
// and a constant multiplication takes m = MULT_CYCLES = 1 cycle.
package lti_pkg;

  localparam int unsigned DW = 32;            // sample / state width
  localparam int unsigned CF = 40;            // coefficient fraction bits
  localparam int unsigned CW = CF + 4;        // coefficient width, range [-8, 8)
  localparam int unsigned MULT_CYCLES = 1;    // m, multiplier delay in adder delays

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [CW-1:0] coef_t;

  // Coefficient num / 2^log2den in the CF-fraction format.
  function automatic coef_t q(input longint num, input int log2den);
    logic signed [CW+15:0] w;
    w = (CW+16)'(num);
    w = w <<< (CF - log2den);
    return coef_t'(w);
  endfunction

  // Constant multiplication c * x, floored to DW bits.
  function automatic data_t cmul(input coef_t c, input data_t x);
    logic signed [DW+CW-1:0] p;
    p = (DW+CW)'(c) * (DW+CW)'(x);
    return data_t'(p >>> CF);
  endfunction

  // Coefficient product c1 * c2 in the coefficient format (used at elaboration
  // to derive the coefficients of unfolded realisations).
  function automatic coef_t cprod(input coef_t c1, input coef_t c2);
    logic signed [2*CW-1:0] p;
    p = (2*CW)'(c1) * (2*CW)'(c2);
    return coef_t'(p >>> CF);
  endfunction

endpackage
