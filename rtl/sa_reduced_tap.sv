// Reduced structural adder a_{i,j}: a tap inside a bisected stretch of the
// tapped delay line.
//
// The partial sum travels as two parts, u * 2^H + l.  The upper part u is
// delayed untouched; only the short lower part l is added to the
// coefficient multiplier output q, in an adder of WLO bits (the width the
// accumulated lower range needs) instead of the full partial sum width.
//
// Timing: u_next and l_next are registered, one clock after the inputs.
// rst_n is a synchronous active-low reset (this design's choice).
module sa_reduced_tap #(
  parameter int WU  = 13,
  parameter int WLI = 14,
  parameter int WQ  = 12,
  parameter int WLO = 14
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [WU-1:0]  u,
  input  logic signed [WLI-1:0] l,
  input  logic signed [WQ-1:0]  q,
  output logic signed [WU-1:0]  u_next,
  output logic signed [WLO-1:0] l_next
);

  logic signed [WLO-1:0] l_sum;

  assign l_sum = WLO'(l) + WLO'(q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_next <= '0;
      l_next <= '0;
    end else begin
      u_next <= u;
      l_next <= l_sum;
    end
  end

endmodule
