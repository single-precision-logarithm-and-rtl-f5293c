// hfp_log_exp: the single-precision natural logarithm and exponential cores
// side by side, each with its own operand, result and valid signals.
//
// Both cores are fully pipelined (one operand per clock) and map their floating-
// point arithmetic onto hard floating-point DSP block models (hfp_dsp):
//   log: 6 FP blocks (3 adders, 3 multiply-adds), a 36x34 fixed-point multiplier,
//        3 tables; latency 25 cycles.
//   exp: 6 FP blocks (3 adders, 2 multiply-adds, 1 multiplier), 3 tables;
//        latency 25 cycles (EXP_ARCH = 1 or 2) or 24 (EXP_ARCH = 3).
// EXP_ARCH picks one of the three exponential variants (see fp_exp); the
// default, 1, is the one the cores were chiefly designed around.
// exp_r[31] is always 0: e^x is never negative, and the NaN it returns is
// positive. rst_n (synchronous, active low) clears only the valid pipelines. The two cores
// follow the document; the valid/reset interface is this design's own.
module hfp_log_exp #(
  parameter int EXP_ARCH = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        log_in_valid,
  input  logic [31:0] log_x,
  output logic        log_out_valid,
  output logic [31:0] log_r,
  input  logic        exp_in_valid,
  input  logic [31:0] exp_x,
  output logic        exp_out_valid,
  output logic [31:0] exp_r
);

  fp_log u_log (
    .clk(clk), .rst_n(rst_n), .in_valid(log_in_valid), .x(log_x),
    .out_valid(log_out_valid), .r(log_r));

  fp_exp #(.ARCH(EXP_ARCH)) u_exp (
    .clk(clk), .rst_n(rst_n), .in_valid(exp_in_valid), .x(exp_x),
    .out_valid(exp_out_valid), .r(exp_r));

endmodule
