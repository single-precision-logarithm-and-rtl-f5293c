// fxp_mult: pipelined unsigned fixed-point multiplier, p = a * b.
//
// In the logarithm core it forms the product m * r_mtop of the 36-bit reciprocal
// and the 25-bit significand m (zero-extended to 34 bits), which the document maps
// onto two DSP blocks in fixed-point mode as a 36x34-bit multiplier. The operand
// widths are the documented ones. The two-register pipeline (operands registered,
// then the product registered) is this design's choice. No reset, no enable:
// p follows a and b two clock edges later.
module fxp_mult #(
  parameter int AW = 36,
  parameter int BW = 34
) (
  input  logic               clk,
  input  logic [AW-1:0]      a,
  input  logic [BW-1:0]      b,
  output logic [AW+BW-1:0]   p
);

  logic [AW-1:0] a_q;
  logic [BW-1:0] b_q;

  always_ff @(posedge clk) begin
    a_q <= a;
    b_q <= b;
    p   <= (AW+BW)'(a_q) * (AW+BW)'(b_q);
  end

endmodule
