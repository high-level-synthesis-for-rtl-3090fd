// sfir_dsp_slice -- one tap of the FPGA-optimised filter, shaped like an
// FPGA DSP slice with pre-adder (as in the UltraScale family).
//
// The slice adds its two sample operands (pre-adder), multiplies the sum by
// the coefficient, registers the product, and adds the registered product
// to the partial sum that arrives from the previous slice on pcin. The new
// partial sum is registered and leaves on pcout for the next slice, so a
// chain of slices forms an accumulation cascade with one register per
// stage instead of an adder tree.
//
//   m     <= h * (a + b)          (PROD_W bits, no overflow possible)
//   pcout <= pcin + m             (ACC_W bits, wraps)
//
// Interface: clk, rst (synchronous, active high), en (clock enable for both
// registers), a/b/h as for sfir_preadd_mult, pcin/pcout the cascade.
// Timing: a product enters pcout two enabled edges after its operands.
//
// The pre-adder, the multiplier, the product register and the registered
// accumulation follow the document's FPGA-optimised schematic and its bill
// of materials (17-bit pre-adder, 13x17->30 multiplier, 30-bit product
// register, 32-bit accumulator adder and register). Reset and enable are
// this design's choice.
module sfir_dsp_slice #(
  parameter int DATA_W = sfir_pkg::DATA_W,
  parameter int COEF_W = sfir_pkg::COEF_W,
  parameter int ACC_W  = sfir_pkg::OUT_W,
  localparam int PROD_W = DATA_W + 1 + COEF_W
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  logic signed [DATA_W-1:0]  a,
  input  logic signed [DATA_W-1:0]  b,
  input  logic signed [COEF_W-1:0]  h,
  input  logic signed [ACC_W-1:0]   pcin,
  output logic signed [ACC_W-1:0]   pcout
);

  logic signed [PROD_W-1:0] p;
  logic signed [PROD_W-1:0] m;

  sfir_preadd_mult #(.DATA_W(DATA_W), .COEF_W(COEF_W)) u_pm (
    .a(a), .b(b), .h(h), .p(p)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      m     <= '0;
      pcout <= '0;
    end else if (en) begin
      m     <= p;
      pcout <= pcin + ACC_W'(m);
    end
  end

endmodule
