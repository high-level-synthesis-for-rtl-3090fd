// sfir_preadd_mult -- one symmetric tap: pre-adder followed by a multiplier.
//
// Because h[k] == h[TAPS-1-k], the two samples that share a coefficient are
// added first and the sum is multiplied once: p = h * (a + b). This halves
// the number of multipliers. All values are two's complement. The pre-adder
// is DATA_W+1 bits wide and the product DATA_W+1+COEF_W bits wide, so
// neither can overflow (16+16 -> 17 and 13 x 17 -> 30 bits at the defaults,
// as in the reference bill of materials).
//
// Purely combinational; no clock.
module sfir_preadd_mult #(
  parameter int DATA_W = sfir_pkg::DATA_W,
  parameter int COEF_W = sfir_pkg::COEF_W,
  localparam int PRE_W  = DATA_W + 1,
  localparam int PROD_W = DATA_W + 1 + COEF_W
) (
  input  logic signed [DATA_W-1:0] a,
  input  logic signed [DATA_W-1:0] b,
  input  logic signed [COEF_W-1:0] h,
  output logic signed [PROD_W-1:0] p
);

  logic signed [PRE_W-1:0] pre;

  always_comb begin
    pre = PRE_W'(a) + PRE_W'(b);
    p   = PROD_W'(pre) * PROD_W'(h);
  end

endmodule
