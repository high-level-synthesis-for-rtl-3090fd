// sfir_delay_line -- tapped delay line (shift register) of the FIR filter.
//
// Holds the DEPTH most recent samples before the current one. On every
// clock edge with en high the line shifts by one place: stage 0 takes din
// and stage i takes stage i-1, so taps[i] holds x[n-1-i] when din is x[n].
// All stages shift in the same cycle (the fully unrolled shift loop of the
// reference design). With en low the line holds its contents.
//
// Interface: clk, rst (synchronous, active high, clears all stages to 0),
// en, din, taps (packed array, index 0 is the newest stored sample).
// Timing: taps is a register output; it changes one cycle after din is
// presented with en high.
//
// The 15 stages of 16 bits are the document's; the reset and the enable
// are this design's choice.
module sfir_delay_line #(
  parameter int DATA_W = sfir_pkg::DATA_W,
  parameter int DEPTH  = sfir_pkg::TAPS - 1
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          en,
  input  logic [DATA_W-1:0]             din,
  output logic [DEPTH-1:0][DATA_W-1:0]  taps
);

  always_ff @(posedge clk) begin
    if (rst) begin
      taps <= '0;
    end else if (en) begin
      taps[0] <= din;
      for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
