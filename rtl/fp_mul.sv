// fp_mul: combinational binary32 multiplier, r = a * b, rounded to nearest-even.
//
// This is the multiplier inside the hard floating-point DSP block model (hfp_dsp).
// Subnormal operands are read as zero and results below the normal range flush to
// signed zero; inf * 0 and any NaN give the quiet NaN 0x7FC00000.
//
// How it works: the 24-bit significands are multiplied into 48 bits, the product
// is normalized by at most one place, the exponents are added, and the 24-bit
// result significand is rounded with a guard bit and a sticky bit. There is no
// pipeline register here; hfp_dsp places the registers around it.
module fp_mul
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] r
);

  always_comb begin
    logic        s;
    logic [47:0] p;
    int          ex;
    logic [24:0] man;
    logic        g;
    logic        st;

    s   = a[31] ^ b[31];
    p   = '0;
    ex  = 0;
    man = '0;
    g   = 1'b0;
    st  = 1'b0;
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) begin
      r = FP_QNAN;
    end else if (is_inf(a) || is_inf(b)) begin
      r = {s, 8'hFF, 23'd0};
    end else if (is_zero(a) || is_zero(b)) begin
      r = {s, 31'd0};
    end else begin
      p  = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
      ex = int'(a[30:23]) + int'(b[30:23]) - 127;
      if (p[47]) begin
        man = {1'b0, p[47:24]};
        g   = p[23];
        st  = |p[22:0];
        ex  = ex + 1;
      end else begin
        man = {1'b0, p[46:23]};
        g   = p[22];
        st  = |p[21:0];
      end
      man = man + {24'd0, g & (st | man[0])};
      if (man[24]) begin
        man = man >> 1;
        ex  = ex + 1;
      end
      if (ex <= 0)        r = {s, 31'd0};
      else if (ex >= 255) r = {s, 8'hFF, 23'd0};
      else                r = {s, ex[7:0], man[22:0]};
    end
  end

endmodule
