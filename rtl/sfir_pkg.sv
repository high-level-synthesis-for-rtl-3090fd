// sfir_pkg -- shared sizes of the symmetric FIR filter.
//
// The filter has TAPS taps whose coefficients are mirror images
// (h[k] == h[TAPS-1-k]), so only TAPS/2 distinct coefficients exist and
// each multiplier serves two samples through a pre-adder. The default sizes
// are those of the reference implementation: 16 taps (a 15-stage delay line
// and 8 multipliers), 16-bit signed samples, 13-bit signed coefficients and
// a 32-bit result. Derived widths follow two's-complement growth: a pre-add
// adds one bit (17), a product is 13 + 17 = 30 bits.
package sfir_pkg;

  parameter int TAPS   = 16;   // filter length, must be even
  parameter int DATA_W = 16;   // input sample width
  parameter int COEF_W = 13;   // coefficient width
  parameter int OUT_W  = 32;   // output and accumulator width

endpackage
