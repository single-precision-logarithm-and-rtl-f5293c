// tb_hfp_log_exp: end-to-end testbench of the log/exp top level at its default
// parameters.
//
// Both cores are driven at the same time with independent operand streams, with
// gaps in the valid signals, and every result is checked against ln()/exp() in
// double precision (within 3 ulp for finite results, exact for exceptions) and
// for its latency (25 cycles each). Besides the results it counts how often each
// mechanism of the two datapaths was used, and fails if one never was:
//   log: close-to-1 path, branch f[22] = 0 and = 1 with range reduction,
//        exceptional operands;
//   exp: K' masked for |x| < 1/2, A = 0 (y' below 2^-8), each of the four
//        normalization cases of e^y' ([2,4), [1,2), [1/2,1), [1/4,1/2) by its
//        exponent), overflow and underflow of the result exponent, out-of-range
//        operands (|x| >= 128 or inf).
module tb_hfp_log_exp;
  import tb_fp_pkg::*;

  localparam int  N       = 20000;
  localparam int  LAT     = 25;
  localparam real MAX_ULP = 3.0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        lv = 1'b0, ev = 1'b0;
  logic [31:0] lx = '0, ex = '0;
  logic        lov, eov;
  logic [31:0] lr, er;

  hfp_log_exp dut (
    .clk(clk), .rst_n(rst_n),
    .log_in_valid(lv), .log_x(lx), .log_out_valid(lov), .log_r(lr),
    .exp_in_valid(ev), .exp_x(ex), .exp_out_valid(eov), .exp_r(er));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] ql_x [$], qe_x [$];
  int          ql_t [$], qe_t [$];
  real         worst_l = 0.0, worst_e = 0.0;

  typedef enum int {
    M_LOG_CLOSE, M_LOG_BR0, M_LOG_BR1, M_LOG_SPECIAL,
    M_EXP_KMASK, M_EXP_AZERO, M_EXP_N4, M_EXP_N2, M_EXP_N1, M_EXP_NQ,
    M_EXP_OVF, M_EXP_UNF, M_EXP_RANGE, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"log close-to-1", "log branch 0", "log branch 1", "log exception",
    "exp K' mask applied", "exp A = 0", "exp e^y' in [2,4)", "exp e^y' in [1,2)", "exp e^y' in [1/2,1)",
    "exp e^y' in [1/4,1/2)", "exp overflow", "exp underflow", "exp operand out of range"};

  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (N + 3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanisms seen inside the exponential, sampled with the valid pipeline
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_exp.vld[2] && dut.u_exp.tiny_k) mech[M_EXP_KMASK]++;
      if (dut.u_exp.vld[9] && dut.u_exp.a_fp[30:0] == 0) mech[M_EXP_AZERO]++;
      if (dut.u_exp.vld[23] && !dut.u_exp.ovf_d && !dut.u_exp.nan_d) begin
        case (dut.u_exp.ey[30:23])
          8'd128: mech[M_EXP_N4]++;
          8'd127: mech[M_EXP_N2]++;
          8'd126: mech[M_EXP_N1]++;
          8'd125: mech[M_EXP_NQ]++;
          default: ;
        endcase
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && lov) begin
      logic [31:0] xv, e;
      real err;
      xv = ql_x.pop_front();
      checks++;
      if (cyc - ql_t.pop_front() != LAT) begin failures++; $display("log latency wrong"); end
      checks++;
      if (isnan32(xv) || xv[31] && xv[30:23] != 0 || xv[30:23] == 0 || xv[30:23] == 8'hFF) begin
        mech[M_LOG_SPECIAL]++;
        e = isnan32(xv) ? 32'h7FC0_0000 : xv[30:23] == 0 ? 32'hFF80_0000 : xv[31] ? 32'h7FC0_0000 : 32'h7F80_0000;
        if (lr !== e) begin failures++; $display("log x=%h got %h expected %h", xv, lr, e); end
      end else begin
        if (xv[22:14] == 0 || xv[22:14] == 9'h1FF) mech[M_LOG_CLOSE]++;
        else if (xv[22]) mech[M_LOG_BR1]++;
        else mech[M_LOG_BR0]++;
        err = ulp_err(lr, $ln(sp2r(xv)));
        if (err > worst_l) worst_l = err;
        if (err > MAX_ULP) begin failures++; $display("log x=%h got %h err %f", xv, lr, err); end
      end
    end
    if (rst_n && eov) begin
      logic [31:0] xv;
      real xr, refv, err;
      xv = qe_x.pop_front();
      checks++;
      if (cyc - qe_t.pop_front() != LAT) begin failures++; $display("exp latency wrong"); end
      checks++;
      xr = sp2r(xv);
      if (isnan32(xv)) begin
        if (er !== 32'h7FC0_0000) begin failures++; $display("exp NaN wrong"); end
      end else if (xv[30:23] >= 8'd134) begin
        mech[M_EXP_RANGE]++;
        if (er !== (xv[31] ? 32'h0 : 32'h7F80_0000)) begin failures++; $display("exp x=%h got %h", xv, er); end
      end else begin
        refv = $exp(xr);
        if (refv > 3.4028234663852886e38) begin
          mech[M_EXP_OVF]++;
          if (er !== 32'h7F80_0000) begin failures++; $display("exp x=%h got %h expected inf", xv, er); end
        end else if (refv < 1.1754943508222875e-38 * 0.9999) begin
          mech[M_EXP_UNF]++;
          if (er !== 32'h0) begin failures++; $display("exp x=%h got %h expected 0", xv, er); end
        end else if (refv > 1.1754943508222875e-38 * 1.0001) begin
          err = ulp_err(er, refv);
          if (err > worst_e) worst_e = err;
          if (err > MAX_ULP) begin failures++; $display("exp x=%h got %h err %f", xv, er, err); end
        end
      end
    end
  end

  function automatic logic [31:0] log_operand();
    case ($urandom_range(7))
      0:       return {1'b0, 8'(126 + $urandom_range(1)), ($urandom_range(1) ? 9'h1FF : 9'h000), 14'($urandom)};
      1:       return {1'($urandom), 8'($urandom_range(2) == 0 ? 0 : 255), 23'($urandom_range(1) ? $urandom : 0)};
      2:       return {1'b1, 8'($urandom_range(254, 1)), 23'($urandom)};
      default: return {1'b0, 8'($urandom_range(254, 1)), 23'($urandom)};
    endcase
  endfunction

  function automatic logic [31:0] exp_operand();
    case ($urandom_range(7))
      0:       return rand_fp(1'($urandom), -20, -2);                 // |x| < 1/2
      1:       return rand_fp(1'($urandom), 7, 127);                  // out of range
      2:       return r2sp(($urandom_range(1) ? 87.0 : -88.5) + 2.0 * real'($urandom) / 4294967296.0);
      3:       return ($urandom_range(3) == 0) ? 32'h7FC0_0000 : {1'($urandom), 8'hFF, 23'd0};
      default: return r2sp(-87.3 + 176.0 * real'($urandom) / 4294967296.0);
    endcase
  endfunction

  initial begin
    logic [31:0] a, b;
    logic        va, vb;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      va = $urandom_range(7) != 0;
      vb = $urandom_range(7) != 0;
      a  = log_operand();
      b  = exp_operand();
      lv <= va; lx <= a;
      ev <= vb; ex <= b;
      if (va) begin ql_x.push_back(a); ql_t.push_back(cyc + 1); end
      if (vb) begin qe_x.push_back(b); qe_t.push_back(cyc + 1); end
      @(posedge clk);
    end
    lv <= 1'b0; ev <= 1'b0;
    repeat (LAT + 5) @(posedge clk);
    $display("worst error: log %f ulp, exp %f ulp", worst_l, worst_e);
    for (int m = 0; m < M_COUNT; m++) begin
      $display("  %-28s %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("  mechanism never used: %s", mech_name[m]); end
    end
    checks++;
    if (ql_x.size() != 0 || qe_x.size() != 0) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
