// fp_log: pipelined single-precision natural logarithm, r = ln(x).
//
// Idea: ln(x) = E*log(2) + log(m) with the branch on the leading fraction bit,
//   f[22] = 0:  E = ex,      m = 1.f      (m in [1, 1.5))
//   f[22] = 1:  E = ex + 1,  m = 1.f / 2  (m in [0.75, 1))
// so that E*log(2) and log(m) never cancel massively (the exact branch point
// sqrt(2) is replaced by 1.5, which needs only f[22]). log(m) is range-reduced
// with a reciprocal r of the top bits of m: log(m) = log(1+y) - log(r) with
// y = m*r - 1 and |y| < 2^-9, and log(1+y) is a 3-term Taylor series
// y*(1 + y*(-1/2 + y/3)) evaluated by Horner's rule.
//
// The three terms are summed in floating point:
//   A = E*log(2)   log_elog2_rom, addressed by e + f[22]
//   B = log(1+y)   Horner on three multiply-add blocks
//   C = log(r)     log_lnr_rom, addressed by f[22:14]
// y is made without rounding the product m*r: r is a 36-bit fixed-point value
// (log_rinv_rom), the 61-bit product P = m*r = 1.000000000xxxx... is split into
// two binary32 numbers with a small overlap, j = P[59:36] (weights 2^0..2^-23)
// and i = 1.P[35:13] * 2^-23 with an injected leading one, and
//   y = (j - (1 + 2^-23)) + i
// where the constant 1 + 2^-23 removes both the 1 and the injected one in a
// single exact subtraction; only the final addition rounds.
// When m is within 2^-9 of 1 (f[22:14] all zeros or all ones, "close"), no
// reduction is needed: the subtracter takes m itself and the constant 1, the
// adder adds zero and C is forced to zero, so y = m - 1 exactly.
//
// DSP mapping (all hfp_dsp): subtracter and adder (3 cycles each), three
// multiply-adds (4 each), final adder (3); the fixed-point product is fxp_mult
// (2 cycles); tables have a 2-cycle read. Latency 25 cycles, one result per
// cycle; out_valid follows in_valid 25 edges later.
//
// Exceptions, decided beside the datapath: NaN -> NaN, x < 0 -> NaN,
// +/-0 and subnormals -> -inf, +inf -> +inf. The algorithm, the table indexing,
// the j/i/k split, the constants and the DSP mapping follow the document; the
// exception handling, the per-stage register split and the rounding direction of
// the reciprocal are this design's choices.
module fp_log
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] x,
  output logic        out_valid,
  output logic [31:0] r
);

  localparam int LATENCY = 25;

  // ---------------- input decode (time 0)
  fp32_t       xf;
  logic        branch;
  logic [8:0]  t;
  logic        close0;
  logic [24:0] m;
  logic [31:0] m_fp;
  logic [31:0] special0;
  logic        is_special0;

  always_comb begin
    xf     = x;
    branch = xf.f[22];
    t      = xf.f[22:14];
    close0 = (t == 9'd0) || (t == 9'h1FF);
    m      = branch ? {2'b01, xf.f} : {1'b1, xf.f, 1'b0};
    m_fp   = {1'b0, branch ? 8'd126 : 8'd127, xf.f};
    is_special0 = 1'b1;
    if (is_nan(x))        special0 = FP_QNAN;
    else if (is_zero(x))  special0 = FP_NINF;
    else if (xf.s)        special0 = FP_QNAN;
    else if (is_inf(x))   special0 = FP_PINF;
    else begin
      special0    = FP_ZERO;
      is_special0 = 1'b0;
    end
  end

  // ---------------- tables (time 2)
  logic [31:0] elog2_2, lnr_2;
  logic [35:0] rinv_2;

  log_elog2_rom u_elog2 (.clk(clk), .addr(xf.e + {7'd0, branch}), .data(elog2_2));
  log_rinv_rom  u_rinv  (.clk(clk), .addr(t), .data(rinv_2));
  log_lnr_rom   u_lnr   (.clk(clk), .addr(t), .data(lnr_2));

  logic [24:0] m_2;
  pipe_delay #(.W(25), .N(2)) u_dm (.clk(clk), .d(m), .q(m_2));

  // ---------------- fixed-point product m * r (time 4)
  logic [69:0] prod_4;
  fxp_mult #(.AW(36), .BW(34)) u_fxp (.clk(clk), .a(rinv_2), .b({9'd0, m_2}), .p(prod_4));

  logic        close_4;
  logic [31:0] m_fp_4;
  pipe_delay #(.W(33), .N(4)) u_dc4 (.clk(clk), .d({close0, m_fp}), .q({close_4, m_fp_4}));

  logic [31:0] j_4, i_4;
  assign j_4 = {1'b0, 8'd127, prod_4[58:36]};
  assign i_4 = {1'b0, 8'd104, prod_4[35:13]};

  // ---------------- y = (j - (1 + ulp)) + i, or m - 1 when close (time 10)
  logic [31:0] d_7, y_10;
  hfp_dsp #(.MODE(HFP_ADD)) u_sub (
    .clk(clk), .x(FP_ZERO), .y(close_4 ? m_fp_4 : j_4),
    .z(close_4 ? FP_ONE : FP_ONE_ULP), .sub(1'b1), .r(d_7));

  logic [31:0] i_7;
  pipe_delay #(.W(32), .N(3)) u_di (.clk(clk), .d(close_4 ? FP_ZERO : i_4), .q(i_7));

  hfp_dsp #(.MODE(HFP_ADD)) u_add (
    .clk(clk), .x(FP_ZERO), .y(d_7), .z(i_7), .sub(1'b0), .r(y_10));

  // ---------------- Taylor series, Horner (time 22)
  logic [31:0] t1_14, t2_18, lm_22, y_14, y_18, c_18;
  logic [31:0] c_2;
  logic        close_2;

  pipe_delay #(.W(1), .N(2)) u_dc2 (.clk(clk), .d(close0), .q(close_2));
  assign c_2 = close_2 ? FP_ZERO : lnr_2;
  pipe_delay #(.W(32), .N(16)) u_dcc (.clk(clk), .d(c_2), .q(c_18));

  pipe_delay #(.W(32), .N(4)) u_dy1 (.clk(clk), .d(y_10), .q(y_14));
  pipe_delay #(.W(32), .N(4)) u_dy2 (.clk(clk), .d(y_14), .q(y_18));

  hfp_dsp #(.MODE(HFP_MULADD)) u_ma1 (
    .clk(clk), .x(y_10), .y(FP_THIRD), .z(FP_MHALF), .sub(1'b0), .r(t1_14));
  hfp_dsp #(.MODE(HFP_MULADD)) u_ma2 (
    .clk(clk), .x(t1_14), .y(y_14), .z(FP_ONE), .sub(1'b0), .r(t2_18));
  hfp_dsp #(.MODE(HFP_MULADD)) u_ma3 (
    .clk(clk), .x(t2_18), .y(y_18), .z(c_18), .sub(1'b1), .r(lm_22));

  // ---------------- final sum with E*log(2) (time 25)
  logic [31:0] elog2_22, sum_25;
  pipe_delay #(.W(32), .N(20)) u_de (.clk(clk), .d(elog2_2), .q(elog2_22));

  hfp_dsp #(.MODE(HFP_ADD)) u_fin (
    .clk(clk), .x(FP_ZERO), .y(lm_22), .z(elog2_22), .sub(1'b0), .r(sum_25));

  // ---------------- exceptions and valid
  logic [31:0] special_25;
  logic        is_special_25;
  pipe_delay #(.W(33), .N(LATENCY)) u_dsp (
    .clk(clk), .d({is_special0, special0}), .q({is_special_25, special_25}));

  assign r = is_special_25 ? special_25 : sum_25;

  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
