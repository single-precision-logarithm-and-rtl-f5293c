// fp_exp: pipelined single-precision exponential, r = e^x.
//
// Idea: x = E'*log(2) + y', e^x = 2^E' * e^y'. E' is found from a reduced
// fixed-point copy of x, x_fxpRed (sign, 7 integer bits, 1 fraction bit), so it
// may be one off the best integer; y' then lies in about (-0.85, 0.85) and e^y'
// in (0.35, 2.83), which only widens the final normalization. A table keyed by
// x_fxpRed returns E' and K' = E'*log(2) as an unevaluated sum of two binary32
// numbers K'high + K'low, and y' is formed in floating point as
//   y' = (x - K'high) - K'low
// which keeps y' accurate through the cancellation. For |x| < 1/2 K' is masked to
// zero (exponent fields cleared; the DSP blocks read them as zero) and E' with it.
// y' is split as A + B: A keeps the bits of y' of weight >= 2^-8 (exp_find_a,
// a mask table on the exponent LSBs of y'), B = y' - A is below 2^-8, e^A comes
// from a 1024-entry table and e^B = 1 + B*(1 + B/2) from two multiply-adds.
// e^y' = e^A * e^B on a multiplier, and the result exponent is the exponent of
// e^y' plus E' (the four normalization cases of e^y' fall out of this addition).
//
// ARCH selects one of the document's three variants:
//   1  K' table addressed by x_fxpRed from a small 8-bit barrel shifter
//      (exp_xred_shift), 9-bit table; e^A table addressed by the fixed-point A
//   2  as 1, but e^A comes from a 4096-entry table addressed straight by
//      exponent and fraction bits of y' (exp_ea12_rom); the A shifter is unused
//   3  as 1, but the K' table is addressed by {s, e[2:0], f[22:16]} straight
//      from x, 11-bit table, one cycle shorter
// Latency: 25 cycles for ARCH 1 and 2, 24 for ARCH 3, one result per cycle. All
// three give bit-identical results: they look up the same values.
//
// Exceptions: NaN -> NaN; |x| >= 128 and +inf -> +inf for x > 0, +0 for x < 0;
// a result exponent above the range gives +inf, below it +0 (subnormals flushed);
// zero and subnormal x give 1.0 through the datapath. Every result, the quiet
// NaN included, is positive, so r[31] is constant 0. The reduction, the tables,
// the masking and the DSP mapping follow the document; the exception handling and
// the per-stage register split are this design's choices.
module fp_exp
  import fp_pkg::*;
#(
  parameter int ARCH = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] r
);

  localparam int TK      = (ARCH == 3) ? 2 : 3;   // time the K' table output is ready
  localparam int LATENCY = TK + 22;

  fp32_t xf;
  assign xf = x;

  // ---------------- K' table (time TK)
  logic [8:0]  ep_k;
  logic [31:0] kh_k, kl_k;
  logic        ovf_k;

  if (ARCH == 3) begin : g_arch3
    exp_k_rom #(.AW(11)) u_krom (
      .clk(clk), .addr({xf.s, xf.e[2:0], xf.f[22:16]}),
      .e_prime(ep_k), .k_high(kh_k), .k_low(kl_k));
    pipe_delay #(.W(1), .N(TK)) u_dov (.clk(clk), .d(xf.e >= 8'd134), .q(ovf_k));
  end else begin : g_arch1
    logic [8:0] xred_1;
    logic       ovf_1;
    exp_xred_shift u_shift (.clk(clk), .x(x), .xred(xred_1), .ovf(ovf_1));
    exp_k_rom #(.AW(9)) u_krom (
      .clk(clk), .addr(xred_1), .e_prime(ep_k), .k_high(kh_k), .k_low(kl_k));
    pipe_delay #(.W(1), .N(TK - 1)) u_dov (.clk(clk), .d(ovf_1), .q(ovf_k));
  end

  // mask K' for |x| < 1/2 (exponent of x below -1)
  logic        tiny_k;
  logic [31:0] x_k, khm_k, klm_k;
  logic [8:0]  epm_k;
  pipe_delay #(.W(33), .N(TK)) u_dx (.clk(clk), .d({xf.e < 8'd126, x}), .q({tiny_k, x_k}));
  assign khm_k = {kh_k[31], kh_k[30:23] & {8{~tiny_k}}, kh_k[22:0]};
  assign klm_k = {kl_k[31], kl_k[30:23] & {8{~tiny_k}}, kl_k[22:0]};
  assign epm_k = ep_k & {9{~tiny_k}};

  // ---------------- y' = (x - K'high) - K'low (time TK+6)
  logic [31:0] d1, yp, klm_d;
  hfp_dsp #(.MODE(HFP_ADD)) u_sub1 (
    .clk(clk), .x(FP_ZERO), .y(x_k), .z(khm_k), .sub(1'b1), .r(d1));
  pipe_delay #(.W(32), .N(3)) u_dkl (.clk(clk), .d(klm_k), .q(klm_d));
  hfp_dsp #(.MODE(HFP_ADD)) u_sub2 (
    .clk(clk), .x(FP_ZERO), .y(d1), .z(klm_d), .sub(1'b1), .r(yp));

  // ---------------- A and B (time TK+7, TK+10)
  logic [31:0] a_fp, yp_d, b;
  logic [9:0]  a_addr;
  exp_find_a u_finda (.clk(clk), .y(yp), .a_fp(a_fp), .a_addr(a_addr));
  pipe_delay #(.W(32), .N(1)) u_dyp (.clk(clk), .d(yp), .q(yp_d));
  hfp_dsp #(.MODE(HFP_ADD)) u_sub3 (
    .clk(clk), .x(FP_ZERO), .y(yp_d), .z(a_fp), .sub(1'b1), .r(b));

  // ---------------- e^A table (time TK+9, or TK+8 for ARCH 2; aligned to TK+18)
  logic [31:0] ea, ea_d;
  if (ARCH == 2) begin : g_ea12
    exp_ea12_rom u_earom (.clk(clk), .y(yp), .data(ea));
    pipe_delay #(.W(32), .N(10)) u_dea (.clk(clk), .d(ea), .q(ea_d));
  end else begin : g_ea10
    exp_ea_rom u_earom (.clk(clk), .addr(a_addr), .data(ea));
    pipe_delay #(.W(32), .N(9)) u_dea (.clk(clk), .d(ea), .q(ea_d));
  end

  // ---------------- e^B = 1 + B*(1 + B/2) (time TK+18)
  logic [31:0] t1, b_d, eb;
  hfp_dsp #(.MODE(HFP_MULADD)) u_ma1 (
    .clk(clk), .x(b), .y(FP_HALF), .z(FP_ONE), .sub(1'b0), .r(t1));
  pipe_delay #(.W(32), .N(4)) u_db (.clk(clk), .d(b), .q(b_d));
  hfp_dsp #(.MODE(HFP_MULADD)) u_ma2 (
    .clk(clk), .x(t1), .y(b_d), .z(FP_ONE), .sub(1'b0), .r(eb));

  // ---------------- e^y' = e^A * e^B (time TK+21)
  logic [31:0] ey;
  hfp_dsp #(.MODE(HFP_MUL)) u_mul (
    .clk(clk), .x(ea_d), .y(eb), .z(FP_ZERO), .sub(1'b0), .r(ey));

  // ---------------- exponent update and exceptions (time TK+22)
  logic [8:0]  ep_d;
  logic        ovf_d, nan_d, sgn_d;
  pipe_delay #(.W(9), .N(21)) u_dep (.clk(clk), .d(epm_k), .q(ep_d));
  pipe_delay #(.W(3), .N(21)) u_dfl (.clk(clk), .d({ovf_k, is_nan(x_k), x_k[31]}),
                                     .q({ovf_d, nan_d, sgn_d}));

  logic [31:0] res;
  always_comb begin
    logic signed [10:0] ex;
    ex = $signed({3'b000, ey[30:23]}) + $signed({{2{ep_d[8]}}, ep_d});
    if (nan_d)            res = FP_QNAN;
    else if (ovf_d)       res = sgn_d ? FP_ZERO : FP_PINF;
    else if (ex >= 11'sd255) res = FP_PINF;
    else if (ex <= 11'sd0)   res = FP_ZERO;
    else                  res = {1'b0, ex[7:0], ey[22:0]};
  end

  always_ff @(posedge clk) r <= res;

  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
