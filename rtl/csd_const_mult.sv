// Coefficient multiplier q = x * C for one fixed coefficient C.
//
// The product is built as a shift-and-add network from the canonic signed
// digit (CSD) form of C: for every nonzero digit d_k (+1 or -1) the input
// shifted left by k is added or subtracted.  The digit masks are computed
// at elaboration, so only the adders the coefficient needs are produced;
// C = 0 gives a constant zero output and no logic.
//
// The filter this belongs to uses a CSD multiplier block as its baseline;
// sharing of common subexpressions between coefficients is not done here
// (each coefficient has its own network), which is this design's choice.
//
// Interface: x is a WX-bit two's complement sample, q the WQ-bit two's
// complement product.  WQ must hold the product range; the filter top sets
// it to the minimum by range estimation.  Purely combinational.
module csd_const_mult #(
  parameter int WX = 8,
  parameter int C  = 5,
  parameter int WQ = 11
) (
  input  logic signed [WX-1:0] x,
  output logic signed [WQ-1:0] q
);

  localparam logic [63:0] POS = fir_sa_pkg::csd_pos(longint'(C));
  localparam logic [63:0] NEG = fir_sa_pkg::csd_neg(longint'(C));

  always_comb begin
    logic signed [WQ-1:0] acc;
    acc = '0;
    for (int k = 0; k < WQ; k++) begin
      if (POS[k]) acc = acc + (WQ'(x) <<< k);
      if (NEG[k]) acc = acc - (WQ'(x) <<< k);
    end
    q = acc;
  end

endmodule
