// tb_hfp_dsp: self-checking testbench of the floating-point DSP block model.
//
// Three instances (multiply-add, add, multiply) receive a new random operand
// triple every clock, including zeros, subnormals, infinities, NaNs, equal and
// opposite operands (exact cancellation) and operands far apart in exponent.
// Expected results are worked out in double precision and rounded to binary32
// here (products of binary32 numbers are exact in double; the multiply-add rounds
// the product first). Results must match bit for bit (any NaN for NaN) and arrive
// 4 (multiply-add) or 3 (add, multiply) cycles after their operands.
module tb_hfp_dsp;
  import tb_fp_pkg::*;
  import fp_pkg::*;

  localparam int N = 30000;

  logic        clk = 1'b0;
  logic [31:0] x = '0, y = '0, z = '0;
  logic        sub = 1'b0;
  logic [31:0] r_ma, r_add, r_mul;

  hfp_dsp #(.MODE(HFP_MULADD)) u_ma  (.clk(clk), .x(x), .y(y), .z(z), .sub(sub), .r(r_ma));
  hfp_dsp #(.MODE(HFP_ADD))    u_add (.clk(clk), .x(x), .y(y), .z(z), .sub(sub), .r(r_add));
  hfp_dsp #(.MODE(HFP_MUL))    u_mul (.clk(clk), .x(x), .y(y), .z(z), .sub(sub), .r(r_mul));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] e_ma [$], e_add [$], e_mul [$];
  int          e_t [$], e_tm [$];
  int          cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] flush(input logic [31:0] a);
    return (a[30:23] == 0) ? {a[31], 31'd0} : a;
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    real s;
    a = flush(a); b = flush(b);
    if (isnan32(a) || isnan32(b)) return 32'h7FC0_0000;
    if (a[30:23] == 8'hFF && b[30:23] == 8'hFF) return (a[31] == b[31]) ? a : 32'h7FC0_0000;
    if (a[30:23] == 8'hFF) return a;
    if (b[30:23] == 8'hFF) return b;
    if (a[30:0] == 0 && b[30:0] == 0) return {a[31] & b[31], 31'd0};
    if (a[30:0] == 0) return b;
    if (b[30:0] == 0) return a;
    s = sp2r(a) + sp2r(b);
    if (s == 0.0) return 32'h0;
    return r2sp(s);
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    logic sgn;
    a = flush(a); b = flush(b);
    sgn = a[31] ^ b[31];
    if (isnan32(a) || isnan32(b)) return 32'h7FC0_0000;
    if ((a[30:23] == 8'hFF && b[30:0] == 0) || (b[30:23] == 8'hFF && a[30:0] == 0)) return 32'h7FC0_0000;
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return {sgn, 8'hFF, 23'd0};
    if (a[30:0] == 0 || b[30:0] == 0) return {sgn, 31'd0};
    return r2sp(sp2r(a) * sp2r(b));
  endfunction

  function automatic logic [31:0] rnd_operand(input logic [31:0] other);
    case ($urandom_range(15))
      0:  return {1'($urandom), 31'd0};
      1:  return {1'($urandom), 8'd0, 23'($urandom)};             // subnormal
      2:  return {1'($urandom), 8'hFF, 23'd0};
      3:  return 32'h7FC0_0000;
      4:  return {~other[31], other[30:0]};                      // cancels other
      5:  return {1'($urandom), 8'(int'(other[30:23]) + $urandom_range(3)), 23'($urandom)};
      6:  return rand_fp(1'($urandom), -126, 127);
      default: return rand_fp(1'($urandom), -40, 40);
    endcase
  endfunction

  function automatic logic same(input logic [31:0] a, input logic [31:0] b);
    return (isnan32(a) && isnan32(b)) || a === b;
  endfunction

  // operands driven in cycle t give add/mul results at t+3 and muladd at t+4
  always @(posedge clk) begin
    if (e_t.size() > 0 && cyc - e_t[0] == 3) begin
      logic [31:0] ev;
      void'(e_t.pop_front());
      ev = e_add.pop_front(); checks++;
      if (!same(r_add, ev)) begin failures++; if (failures < 20) $display("add: got %h expected %h", r_add, ev); end
      ev = e_mul.pop_front(); checks++;
      if (!same(r_mul, ev)) begin failures++; if (failures < 20) $display("mul: got %h expected %h", r_mul, ev); end
    end
    if (e_tm.size() > 0 && cyc - e_tm[0] == 4) begin
      logic [31:0] ev;
      void'(e_tm.pop_front());
      ev = e_ma.pop_front(); checks++;
      if (!same(r_ma, ev)) begin failures++; if (failures < 20) $display("muladd: got %h expected %h", r_ma, ev); end
    end
  end

  initial begin
    logic [31:0] a, b, c, cz;
    logic        s;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      a  = rand_fp(1'($urandom), -40, 40);
      b  = rnd_operand(a);
      a  = ($urandom_range(7) == 0) ? rnd_operand(b) : a;
      s  = 1'($urandom);
      // z chosen near the product or near y, so that cancellation happens often
      if ($urandom_range(1)) c = rnd_operand(ref_mul(a, b));
      else                   c = rnd_operand(b);
      cz = {c[31] ^ s, c[30:0]};
      x <= a; y <= b; z <= c; sub <= s;
      e_add.push_back(ref_add(b, cz));
      e_mul.push_back(ref_mul(a, b));
      e_ma.push_back(ref_add(ref_mul(a, b), cz));
      e_t.push_back(cyc + 1);
      e_tm.push_back(cyc + 1);
      @(posedge clk);
    end
    repeat (6) @(posedge clk);
    checks++;
    if (e_t.size() != 0 || e_tm.size() != 0) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
