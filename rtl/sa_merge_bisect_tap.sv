// Concurrent merge/bisect structural adder.
//
// The incoming partial sum is u * 2^HP + l, bisected earlier at bit HP.
// At this tap the lower part l is bisected again at bit H (H <= HP):
//   l_u = l >>> H            (signed, upper bits of l)
//   l_l = l[H-1:0]           (unsigned, H bits)
// Two independent additions then run side by side:
//   u_next = u * 2^(HP-H) + l_u     merge of the old upper part
//   l_next = l_l + q                new short lower part, plus this tap's
//                                   coefficient multiplier output
// so the value carried on, u_next * 2^H + l_next, equals the incoming
// partial sum plus q.  Because the two adders do not depend on each other,
// the delay through this tap is that of the longer of two short adders.
//
// The low HP-H bits of u * 2^(HP-H) are zero, so the merge adder is really
// only as long as the upper part; the shift is written arithmetically and
// left to synthesis.  Widths are set by the filter top from range
// estimation; all additions are modulo their width and the true results
// fit, so nothing overflows.
//
// Timing: registered outputs, one clock after the inputs.  rst_n is a
// synchronous active-low reset (this design's choice).
module sa_merge_bisect_tap #(
  parameter int WUI = 13,
  parameter int WLI = 14,
  parameter int HP  = 12,
  parameter int H   = 11,
  parameter int WQ  = 12,
  parameter int WUO = 14,
  parameter int WLO = 13
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [WUI-1:0] u,
  input  logic signed [WLI-1:0] l,
  input  logic signed [WQ-1:0]  q,
  output logic signed [WUO-1:0] u_next,
  output logic signed [WLO-1:0] l_next
);

  logic signed [WLI-H-1:0] l_u;
  logic signed [WUO-1:0]   u_sum;
  logic signed [WLO-1:0]   l_sum;

  assign l_u   = l[WLI-1:H];
  assign u_sum = (WUO'(u) <<< (HP - H)) + WUO'(l_u);
  assign l_sum = WLO'(signed'({1'b0, l[H-1:0]})) + WLO'(q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_next <= '0;
      l_next <= '0;
    end else begin
      u_next <= u_sum;
      l_next <= l_sum;
    end
  end

endmodule
