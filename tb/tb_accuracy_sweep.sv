// tb_accuracy_sweep: accuracy sweep of both cores against the OpenCL bound.
//
// OpenCL allows single-precision log and exp an error of 3 ulp and lets them
// flush subnormals; conformance runs billions of vectors. This testbench runs a
// deterministic subset that covers the whole input domain evenly. It walks the
// binary32 encodings with a fixed odd stride, so every exponent, every
// reciprocal-table entry of the log and every K' entry of the exp is hit many
// times at unrelated fraction patterns:
//   log: every STRIDE-th encoding of the positive normal numbers,
//        0x00800000 .. 0x7F7FFFFF (about 8.3 million operands);
//   exp: every STRIDE-th encoding of the normal numbers in [-87.33, 88.72],
//        negative and positive (about 8.7 million operands).
// The top, hfp_log_exp, runs at its default parameters. Both cores take a new
// operand on every cycle. Each result is checked against ln() or exp() in
// double precision: error at most MAX_ULP, and exactly 25 cycles of latency. At
// the end the worst error of each core is printed, with the share of results
// that are not correctly rounded (error over half an ulp).
module tb_accuracy_sweep;
  import tb_fp_pkg::*;

  localparam int          STRIDE  = 255;
  localparam real         MAX_ULP = 3.0;
  localparam logic [31:0] LOG_LO  = 32'h0080_0000;   // smallest positive normal
  localparam logic [31:0] LOG_HI  = 32'h7F7F_FFFF;   // largest finite
  localparam logic [31:0] EXP_NEG = 32'hC2AE_AC4F;   // about -87.33, 2^-126 result
  localparam logic [31:0] EXP_POS = 32'h42B1_7217;   // about 88.72, largest finite result
  localparam real         MIN_NORMAL = 1.1754943508222875e-38;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        log_in_valid = 1'b0, exp_in_valid = 1'b0;
  logic [31:0] log_x = '0, exp_x = '0;
  logic        log_out_valid, exp_out_valid;
  logic [31:0] log_r, exp_r;

  hfp_log_exp dut (
    .clk(clk), .rst_n(rst_n),
    .log_in_valid(log_in_valid), .log_x(log_x), .log_out_valid(log_out_valid), .log_r(log_r),
    .exp_in_valid(exp_in_valid), .exp_x(exp_x), .exp_out_valid(exp_out_valid), .exp_r(exp_r));

  always #5 clk = ~clk;

  int  checks = 0, failures = 0, cyc = 0;
  int  n_log = 0, n_exp = 0, log_cr = 0, exp_cr = 0;
  real worst_log = 0.0, worst_exp = 0.0;
  logic [31:0] lq_x [$], eq_x [$];
  int          lq_t [$], eq_t [$];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (9500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && log_out_valid) begin
      logic [31:0] xv;
      int  t0;
      real err;
      xv = lq_x.pop_front(); t0 = lq_t.pop_front();
      checks++;
      if (cyc - t0 != 25) begin failures++; $display("log latency %0d", cyc - t0); end
      err = ulp_err(log_r, $ln(sp2r(xv)));
      n_log++;
      if (err > 0.5001) log_cr++;
      if (err > worst_log) worst_log = err;
      checks++;
      if (err > MAX_ULP) begin
        failures++;
        if (failures < 20) $display("log x=%h: got %h, err %f ulp", xv, log_r, err);
      end
    end
    if (rst_n && exp_out_valid) begin
      logic [31:0] xv;
      int  t0;
      real refv, err;
      xv = eq_x.pop_front(); t0 = eq_t.pop_front();
      checks++;
      if (cyc - t0 != 25) begin failures++; $display("exp latency %0d", cyc - t0); end
      refv = $exp(sp2r(xv));
      // at the bottom of the range a result may round to either side of 2^-126
      err  = (refv < MIN_NORMAL * 1.0001 && exp_r == 32'h0) ? 0.0 : ulp_err(exp_r, refv);
      n_exp++;
      if (err > 0.5001) exp_cr++;
      if (err > worst_exp) worst_exp = err;
      checks++;
      if (err > MAX_ULP) begin
        failures++;
        if (failures < 20) $display("exp x=%h: got %h, err %f ulp", xv, exp_r, err);
      end
    end
  end

  initial begin
    logic [32:0] lx, en, ep;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    lx = {1'b0, LOG_LO};
    en = {1'b0, EXP_NEG};
    ep = {1'b0, LOG_LO};
    while (lx <= {1'b0, LOG_HI} || en >= 33'h0_8080_0000 || ep <= {1'b0, EXP_POS}) begin
      log_in_valid <= 1'b0;
      exp_in_valid <= 1'b0;
      if (lx <= {1'b0, LOG_HI}) begin
        log_x        <= lx[31:0];
        log_in_valid <= 1'b1;
        lq_x.push_back(lx[31:0]); lq_t.push_back(cyc + 1);
        lx = lx + 33'(STRIDE);
      end
      if (en >= 33'h0_8080_0000) begin          // negative operands, toward -0
        exp_x        <= en[31:0];
        exp_in_valid <= 1'b1;
        eq_x.push_back(en[31:0]); eq_t.push_back(cyc + 1);
        en = en - 33'(STRIDE);
      end else if (ep <= {1'b0, EXP_POS}) begin // then positive ones
        exp_x        <= ep[31:0];
        exp_in_valid <= 1'b1;
        eq_x.push_back(ep[31:0]); eq_t.push_back(cyc + 1);
        ep = ep + 33'(STRIDE);
      end
      @(posedge clk);
    end
    log_in_valid <= 1'b0;
    exp_in_valid <= 1'b0;
    repeat (30) @(posedge clk);
    $display("log: %0d operands, worst %f ulp, %0d not correctly rounded",
             n_log, worst_log, log_cr);
    $display("exp: %0d operands, worst %f ulp, %0d not correctly rounded",
             n_exp, worst_exp, exp_cr);
    checks++;
    if (lq_x.size() != 0 || eq_x.size() != 0 || n_log < 8000000 || n_exp < 8000000) begin
      failures++;
      $display("results missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
