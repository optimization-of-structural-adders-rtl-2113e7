// First bisecting structural adder of the tapped delay line.
//
// A long partial sum p (WP bits) is split at bit H into an upper part
// p_u = p[WP-1:H] and a lower part p_l = p[H-1:0].  The upper part is not
// added to anything: it is only delayed.  The lower part is given an
// artificial 0 sign bit (it is an unsigned H-bit number) and added to the
// sign-extended coefficient multiplier output q in a short adder of WL
// bits.  The value carried on is u * 2^H + l, which equals p + q.
//
// WL is the width the range of p_l + q needs (2^H - 1 + max q down to
// min q); the filter top computes it.  The adder is WL bits instead of the
// full partial sum width, at the cost of WL - H extra register bits.
//
// Timing: u_next and l_next are registered, one clock after the inputs.
// rst_n is a synchronous active-low reset (this design's choice).
module sa_bisect_tap #(
  parameter int WP = 25,
  parameter int WQ = 13,
  parameter int H  = 12,
  parameter int WL = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [WP-1:0]    p,
  input  logic signed [WQ-1:0]    q,
  output logic signed [WP-H-1:0]  u_next,
  output logic signed [WL-1:0]    l_next
);

  logic signed [WL-1:0] l_sum;

  assign l_sum = WL'(signed'({1'b0, p[H-1:0]})) + WL'(q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_next <= '0;
      l_next <= '0;
    end else begin
      u_next <= p[WP-1:H];
      l_next <= l_sum;
    end
  end

endmodule
