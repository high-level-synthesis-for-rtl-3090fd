// sfir_fpga -- symmetric FIR filter, FPGA-optimised (systolic) architecture.
//
// Same filter as sfir_asic, y[n] = sum_k h[k] * (x[n-k] + x[n-TAPS+1+k]),
// but built as a chain of TAPS/2 DSP-slice taps (sfir_dsp_slice) whose
// registered partial sums cascade from slice 0 (h[0]) to slice TAPS/2-1,
// the way chained DSP slices accumulate on an FPGA. The adder tree of the
// ASIC version is replaced by this accumulation chain with its extra
// registers.
//
// Time alignment. Because the chain adds one register per slice, slice k
// must see its samples k cycles later than slice 0. The sample line is
// therefore split in two:
//   * a forward line with two registers per slice: slice k reads x delayed
//     by 2k cycles (slice 0 reads the input port directly);
//   * one shared operand, x delayed by TAPS-1 cycles (one register behind
//     the last forward stage), broadcast to the second pre-adder input of
//     every slice.
// Working through the delays, slice k adds h[k] * (x[n-k] + x[n-TAPS+1+k])
// for the same n in every slice. The line still holds exactly TAPS-1
// sample registers (2*(TAPS/2-1) forward + 1 shared), as in the document's
// bill of materials for this version.
//
// Interface: as sfir_asic, plus cas_in, a 32-bit partial sum added at the
// head of the chain (tie to 0 for a single filter; it lets two filters be
// cascaded). Timing: one sample per enabled edge; the result for the sample
// presented at an enabled edge appears on y_out after TAPS/2+1 enabled
// edges (9 at the defaults). cas_in is added to the result that leaves
// TAPS/2 enabled edges after it is presented. en low freezes every
// register. rst is synchronous, active high, and clears every register.
//
// The chain structure, widths and register counts follow the document; the
// split of the sample line that keeps the chain aligned, the meaning of the
// 32-bit cas_in input, the enable and the reset are this design's choices.
module sfir_fpga #(
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
  output logic signed [OUT_W-1:0]       y_out
);

  if (TAPS < 2 || TAPS % 2 != 0) begin : g_bad_taps
    $error("TAPS must be even and at least 2");
  end

  localparam int FWD = 2 * (NH - 1);   // forward line registers

  logic [FWD:0][DATA_W-1:0]   fwd;     // fwd[j] = x delayed by j cycles
  logic [DATA_W-1:0]          far_smp; // x delayed by TAPS-1 cycles
  logic [NH:0][OUT_W-1:0]     chain;

  assign fwd[0] = x_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      fwd[FWD:1] <= '0;
      far_smp    <= '0;
    end else if (en) begin
      for (int j = 1; j <= FWD; j++) fwd[j] <= fwd[j-1];
      far_smp <= fwd[FWD];
    end
  end

  assign chain[0] = cas_in;

  for (genvar k = 0; k < NH; k++) begin : g_slice
    sfir_dsp_slice #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(OUT_W)) u_dsp (
      .clk(clk), .rst(rst), .en(en),
      .a(fwd[2*k]),
      .b(far_smp),
      .h(coef[k]),
      .pcin(chain[k]),
      .pcout(chain[k+1])
    );
  end

  assign y_out = chain[NH];

endmodule
