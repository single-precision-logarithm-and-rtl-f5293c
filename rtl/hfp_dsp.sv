// hfp_dsp: model of a hard floating-point DSP block in its floating-point mode.
//
// The block has three binary32 inputs x, y, z and one output r, and is configured
// (MODE) for one operation:
//   HFP_MULADD  r = x*y + z   (or x*y - z when sub = 1)   4 cycles
//   HFP_ADD     r = y + z     (or y - z when sub = 1)     3 cycles
//   HFP_MUL     r = x*y                                   3 cycles
// The multiply-add is not fused: the product is rounded before it is added, as the
// block has a separate multiplier and adder with a register between them.
// Subnormals are flushed to zero on input and output, results are rounded to
// nearest-even.
//
// Pipeline, following the four optional stages the block offers: an input
// register, a register after the multiplier, a register at the adder input and an
// output register. The multiply-add uses all four; the adder uses input, adder-
// input and output registers; the multiplier uses input, multiplier and output
// registers. The block is a free-running pipeline with no enable and no reset:
// every operand presented on a clock edge produces its result 4 (multiply-add)
// or 3 (add, multiply) edges later.
// The stage counts per mode are the documented ones; using the sub input to
// negate z is this model's way of selecting subtraction.
module hfp_dsp
  import fp_pkg::*;
#(
  parameter hfp_mode_e MODE = HFP_MULADD
) (
  input  logic        clk,
  input  logic [31:0] x,
  input  logic [31:0] y,
  input  logic [31:0] z,
  input  logic        sub,
  output logic [31:0] r
);

  // stage 1: input registers
  logic [31:0] x1, y1, z1;
  always_ff @(posedge clk) begin
    x1 <= x;
    y1 <= y;
    z1 <= {z[31] ^ sub, z[30:0]};
  end

  logic [31:0] prod;
  fp_mul u_mul (.a(x1), .b(y1), .r(prod));

  logic [31:0] add_a, add_b, sum;
  fp_add u_add (.a(add_a), .b(add_b), .r(sum));

  if (MODE == HFP_MULADD) begin : g_muladd
    logic [31:0] p2, z2, p3, z3, r4;
    always_ff @(posedge clk) begin
      p2 <= prod;   // multiplier pipeline register
      z2 <= z1;
      p3 <= p2;     // adder input register
      z3 <= z2;
      r4 <= sum;    // output register
    end
    assign add_a = p3;
    assign add_b = z3;
    assign r     = r4;
  end else if (MODE == HFP_ADD) begin : g_add
    logic [31:0] y2, z2, r3;
    always_ff @(posedge clk) begin
      y2 <= y1;     // adder input register
      z2 <= z1;
      r3 <= sum;    // output register
    end
    assign add_a = y2;
    assign add_b = z2;
    assign r     = r3;
  end else begin : g_mul
    logic [31:0] p2, r3;
    always_ff @(posedge clk) begin
      p2 <= prod;   // multiplier pipeline register
      r3 <= p2;     // output register
    end
    assign add_a = FP_ZERO;
    assign add_b = FP_ZERO;
    assign r     = r3;
  end

endmodule
