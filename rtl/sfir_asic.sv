// sfir_asic -- symmetric FIR filter, ASIC-optimised architecture.
//
// Computes y[n] = sum_{k=0}^{TAPS/2-1} h[k] * (x[n-k] + x[n-TAPS+1+k]),
// the direct FIR sum with mirrored coefficients folded together. The
// structure follows the reference schematic: a (TAPS-1)-stage delay line
// whose stages are read from both ends, TAPS/2 pre-adders pairing the
// newest and the oldest sample, TAPS/2 multipliers, a balanced adder tree
// and one output register. There are no pipeline registers between
// multiplier and tree; the whole datapath is one combinational path. At the
// defaults: 15 x 16-bit line, 8 pre-adders, 8 multipliers 13x17->30,
// adders 4 x 31, 2 x 32, 1 x 32 bits, and a 32-bit output register.
//
// Interface: x_in is the sample x[n] of the current cycle; coef[k] is h[k]
// for k = 0 .. TAPS/2-1 (h[0] multiplies the newest and oldest samples).
// y_out is the registered result. Timing: one new sample per enabled clock
// edge (initiation interval 1); the result for the sample presented at an
// enabled edge appears on y_out right after that edge, i.e. a latency of
// one cycle. en low freezes the delay line and the output register.
// rst is synchronous and active high and clears the delay line and y_out.
//
// The enable, the reset and the packing of the coefficients into one port
// are this design's choices; the rest follows the document.
module sfir_asic #(
  parameter int TAPS   = sfir_pkg::TAPS,
  parameter int DATA_W = sfir_pkg::DATA_W,
  parameter int COEF_W = sfir_pkg::COEF_W,
  parameter int OUT_W  = sfir_pkg::OUT_W,
  localparam int NH     = TAPS / 2,
  localparam int PROD_W = DATA_W + 1 + COEF_W
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          en,
  input  logic signed [DATA_W-1:0]      x_in,
  input  logic [NH-1:0][COEF_W-1:0]     coef,
  output logic signed [OUT_W-1:0]       y_out
);

  if (TAPS < 2 || TAPS % 2 != 0) begin : g_bad_taps
    $error("TAPS must be even and at least 2");
  end

  // Samples x[n] .. x[n-TAPS+1]: index 0 is the input port itself.
  logic [TAPS-2:0][DATA_W-1:0] line;
  logic [TAPS-1:0][DATA_W-1:0] smp;
  logic [NH-1:0][PROD_W-1:0]   prod;
  logic signed [OUT_W-1:0]     acc;

  sfir_delay_line #(.DATA_W(DATA_W), .DEPTH(TAPS-1)) u_line (
    .clk(clk), .rst(rst), .en(en), .din(x_in), .taps(line)
  );

  assign smp = {line, x_in};

  for (genvar k = 0; k < NH; k++) begin : g_tap
    sfir_preadd_mult #(.DATA_W(DATA_W), .COEF_W(COEF_W)) u_tap (
      .a(smp[k]),
      .b(smp[TAPS-1-k]),
      .h(coef[k]),
      .p(prod[k])
    );
  end

  sfir_adder_tree #(.N(NH), .IN_W(PROD_W), .OUT_W(OUT_W)) u_tree (
    .terms(prod), .sum(acc)
  );

  always_ff @(posedge clk) begin
    if (rst)     y_out <= '0;
    else if (en) y_out <= acc;
  end

endmodule
