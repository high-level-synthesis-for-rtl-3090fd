// sfir_adder_tree -- balanced binary adder tree.
//
// Sums N signed terms of IN_W bits in ceil(log2 N) levels of two-input
// adders. Each level is one bit wider than the one before it, so no partial
// sum can overflow, until the width reaches OUT_W; from there on the adders
// are OUT_W bits wide and wrap (two's complement). At the defaults this is
// the tree of the ASIC-optimised filter: four 30+30->31, two 31+31->32 and
// one 32+32->32 adder. When N is not a power of two the missing leaves are
// tied to zero and the tools remove those adders.
//
// Purely combinational; the caller registers the result.
module sfir_adder_tree #(
  parameter int N     = sfir_pkg::TAPS / 2,
  parameter int IN_W  = sfir_pkg::DATA_W + 1 + sfir_pkg::COEF_W,
  parameter int OUT_W = sfir_pkg::OUT_W
) (
  input  logic [N-1:0][IN_W-1:0] terms,
  output logic signed [OUT_W-1:0] sum
);

  localparam int LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int NP     = 1 << LEVELS;   // leaves after padding

  // Width of the results of level l (level 0 are the leaves).
  function automatic int lw(int l);
    return (IN_W + l > OUT_W) ? OUT_W : IN_W + l;
  endfunction

  logic signed [IN_W-1:0] leaf [NP];

  always_comb begin
    for (int i = 0; i < NP; i++) leaf[i] = (i < N) ? terms[i] : '0;
  end

  if (LEVELS == 0) begin : g_single
    assign sum = OUT_W'(leaf[0]);
  end else begin : g_tree
    for (genvar l = 1; l <= LEVELS; l++) begin : lvl
      localparam int NL = NP >> l;
      logic signed [lw(l)-1:0] s [NL];
      for (genvar i = 0; i < NL; i++) begin : add
        if (l == 1) begin : g_leaf
          assign s[i] = lw(l)'(leaf[2*i]) + lw(l)'(leaf[2*i+1]);
        end else begin : g_node
          assign s[i] = lw(l)'(lvl[l-1].s[2*i]) + lw(l)'(lvl[l-1].s[2*i+1]);
        end
      end
    end
    assign sum = OUT_W'(lvl[LEVELS].s[0]);
  end

endmodule
