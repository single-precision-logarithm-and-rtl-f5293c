// fp_add: combinational binary32 adder, r = a + b, rounded to nearest-even.
//
// This is the adder inside the hard floating-point DSP block model (hfp_dsp).
// Subnormal operands are read as zero and results below the normal range are
// flushed to zero, as in the DSP blocks the cores target. Infinities and NaNs
// follow IEEE-754 (inf - inf and any NaN give the quiet NaN 0x7FC00000).
//
// How it works: the operands are ordered by magnitude, the smaller significand is
// shifted right with three extra bits (guard, round and a sticky bit ORed into the
// last place), the significands are added or subtracted, the sum is normalized
// with a leading-zero count, and rounded. There is no pipeline register here;
// hfp_dsp places the registers around it.
module fp_add
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] r
);

  always_comb begin
    logic        big_s, sml_s, eff_sub;
    logic [7:0]  big_e, sml_e;
    logic [26:0] big_m, sml_m, sml_sh;
    logic [27:0] sum;
    logic [7:0]  d;
    logic        sticky;
    int          lz;
    int          ex;
    logic [24:0] man;
    logic        rnd;

    big_s = 1'b0; sml_s = 1'b0; big_e = '0; sml_e = '0;
    big_m = '0; sml_m = '0; sml_sh = '0; sum = '0; d = '0;
    sticky = 1'b0; lz = 0; ex = 0; man = '0; rnd = 1'b0; eff_sub = 1'b0;
    r = FP_ZERO;

    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_inf(b) && a[31] != b[31])) begin
      r = FP_QNAN;
    end else if (is_inf(a)) begin
      r = a;
    end else if (is_inf(b)) begin
      r = b;
    end else if (is_zero(a) && is_zero(b)) begin
      r = {a[31] & b[31], 31'd0};
    end else if (is_zero(a)) begin
      r = b;
    end else if (is_zero(b)) begin
      r = a;
    end else begin
      if (a[30:0] >= b[30:0]) begin
        big_s = a[31]; big_e = a[30:23]; big_m = {1'b1, a[22:0], 3'b000};
        sml_s = b[31]; sml_e = b[30:23]; sml_m = {1'b1, b[22:0], 3'b000};
      end else begin
        big_s = b[31]; big_e = b[30:23]; big_m = {1'b1, b[22:0], 3'b000};
        sml_s = a[31]; sml_e = a[30:23]; sml_m = {1'b1, a[22:0], 3'b000};
      end
      eff_sub = big_s ^ sml_s;
      d = big_e - sml_e;
      if (d > 8'd26) begin
        sml_sh = '0;
        sticky = 1'b1;
      end else begin
        sml_sh = sml_m >> d;
        sticky = (sml_sh << d) != sml_m;
      end
      sml_sh[0] = sml_sh[0] | sticky;
      sum = eff_sub ? {1'b0, big_m} - {1'b0, sml_sh} : {1'b0, big_m} + {1'b0, sml_sh};
      ex  = int'(big_e);
      if (sum == '0) begin
        r = FP_ZERO;                       // exact cancellation gives +0
      end else begin
        if (sum[27]) begin
          sum = {1'b0, sum[27:2], sum[1] | sum[0]};
          ex  = ex + 1;
        end else begin
          lz = 0;
          for (int i = 26; i >= 0; i--) begin
            if (sum[i] && lz == 0) lz = 27 - i;
          end
          lz  = lz - 1;                    // leading zeros above bit 26
          sum = sum << lz;
          ex  = ex - lz;
        end
        // significand in sum[26:3], guard sum[2], round/sticky sum[1:0]
        rnd = sum[2] & (sum[1] | sum[0] | sum[3]);
        man = {1'b0, sum[26:3]} + {24'd0, rnd};
        if (man[24]) begin
          man = man >> 1;
          ex  = ex + 1;
        end
        if (ex <= 0)        r = {big_s, 31'd0};
        else if (ex >= 255) r = {big_s, 8'hFF, 23'd0};
        else                r = {big_s, ex[7:0], man[22:0]};
      end
    end
  end

endmodule
