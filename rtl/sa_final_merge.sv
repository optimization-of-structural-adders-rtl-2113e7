// Final merging structural adder a_0 at the output end of a bisected
// tapped delay line.
//
// The incoming partial sum is u * 2^H + l.  Two carry propagate adders in
// series produce the filter output:
//   lf = l + q                   short adder of WLF bits (lower part plus
//                                the last coefficient multiplier output)
//   y  = { u + (lf >>> H), lf[H-1:0] }
// The second adder only spans the upper WY-H bits because the H low bits of
// the shifted upper part are zero; lf[H-1:0] goes straight to the output.
// Compared with a plain structural adder this puts one more adder bit on
// the path through this tap.
//
// Timing: combinational, as the last structural adder of a transposed
// direct form filter drives the output directly.
module sa_final_merge #(
  parameter int WU  = 13,
  parameter int WL  = 14,
  parameter int H   = 12,
  parameter int WQ  = 11,
  parameter int WLF = 15,
  parameter int WY  = 25
) (
  input  logic signed [WU-1:0] u,
  input  logic signed [WL-1:0] l,
  input  logic signed [WQ-1:0] q,
  output logic signed [WY-1:0] y
);

  logic signed [WLF-1:0]   lf;
  logic signed [WLF-H-1:0] lf_u;
  logic signed [WY-H-1:0]  y_u;

  assign lf   = WLF'(l) + WLF'(q);
  assign lf_u = lf[WLF-1:H];
  assign y_u  = (WY-H)'(u) + (WY-H)'(lf_u);
  assign y    = {y_u, lf[H-1:0]};

endmodule
