// Conventional structural adder a_i of a transposed direct form FIR filter,
// followed by its delay element.
//
// The adder sums the delayed partial sum p (from the tap before) and the
// coefficient multiplier output q; the sum is held one clock in a register
// and leaves as the partial sum for the next tap.  Both operands are sign
// extended to the sum width WS, which the filter top sets from the range
// of the partial sum, so the addition never overflows.
//
// With REG = 0 the register is left out and the sum is combinational: this
// is the last adder a_0, whose sum is the filter output (as in the
// textbook TDF structure, the output is not registered).
//
// Timing: p_next = p + q one clock after the operands (REG = 1), or in the
// same cycle (REG = 0).  rst_n is a synchronous active-low reset that
// clears the register; the reset is this design's choice.
module sa_tap #(
  parameter int WP  = 11,
  parameter int WQ  = 12,
  parameter int WS  = 13,
  parameter bit REG = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [WP-1:0] p,
  input  logic signed [WQ-1:0] q,
  output logic signed [WS-1:0] p_next
);

  logic signed [WS-1:0] sum;

  assign sum = WS'(p) + WS'(q);

  if (REG) begin : g_reg
    always_ff @(posedge clk) begin
      if (!rst_n) p_next <= '0;
      else        p_next <= sum;
    end
  end else begin : g_comb
    assign p_next = sum;
  end

endmodule
