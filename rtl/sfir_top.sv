// sfir_top -- the symmetric FIR filter in both of its architectures.
//
// The same filter is built twice, side by side, on the same sample stream
// and the same coefficient set: sfir_asic (adder tree, one-cycle latency,
// fewest registers) and sfir_fpga (cascaded DSP-slice chain, TAPS/2+1
// cycles latency, registered accumulation suited to FPGA DSP columns).
// Both outputs are brought out so the two can be compared sample by
// sample; after the difference in latency they carry identical values
// (with cas_in at zero). A product would normally keep only one of them,
// chosen by the target; having both lets one test bench check one against
// the other. The two architectures are the document's; placing them side by
// side on shared inputs is this design's choice.
//
// Interface: clk, rst (synchronous, active high), en (advance both
// filters), x_in (signed sample), coef (TAPS/2 coefficients, coef[0] = h[0]),
// cas_in (partial sum fed to the head of the FPGA chain), y_asic, y_fpga.
module sfir_top #(
  parameter int TAPS   = sfir_pkg::TAPS,
  parameter int DATA_W = sfir_pkg::DATA_W,
  parameter int COEF_W = sfir_pkg::COEF_W,
  parameter int OUT_W  = sfir_pkg::OUT_W,
  localparam int NH     = TAPS / 2
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          en,
  input  logic signed [DATA_W-1:0]      x_in,
  input  logic [NH-1:0][COEF_W-1:0]     coef,
  input  logic signed [OUT_W-1:0]       cas_in,
  output logic signed [OUT_W-1:0]       y_asic,
  output logic signed [OUT_W-1:0]       y_fpga
);

  sfir_asic #(.TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W)) u_asic (
    .clk(clk), .rst(rst), .en(en), .x_in(x_in), .coef(coef), .y_out(y_asic)
  );

  sfir_fpga #(.TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W)) u_fpga (
    .clk(clk), .rst(rst), .en(en), .x_in(x_in), .coef(coef), .cas_in(cas_in),
    .y_out(y_fpga)
  );

endmodule
