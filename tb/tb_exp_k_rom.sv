// tb_exp_k_rom: checks the E' / K' table of the exponential in both address forms.
// The 9-bit table (address {s, mag}) is read completely; for each entry E' must be
// the integer nearest to (-1)^s * mag / 2 / ln 2, K'high must be E' * ln 2 rounded
// to binary32 and K'high + K'low must equal E' * ln 2 to far better than binary32
// (relative error below 2^-40). The 11-bit table (address {s, e[2:0], f[22:16]})
// is read completely too and each entry must equal the 9-bit entry of the same
// reduced input. Reads are two cycles long.
module tb_exp_k_rom;
  import tb_fp_pkg::*;
  localparam real LN2 = 0.69314718055994530942;
  logic        clk = 1'b0;
  logic [8:0]  a9 = '0;
  logic [10:0] a11 = '0;
  logic [8:0]  ep9, ep11;
  logic [31:0] kh9, kl9, kh11, kl11;
  exp_k_rom #(.AW(9))  d9  (.clk(clk), .addr(a9),  .e_prime(ep9),  .k_high(kh9),  .k_low(kl9));
  exp_k_rom #(.AW(11)) d11 (.clk(clk), .addr(a11), .e_prime(ep11), .k_high(kh11), .k_low(kl11));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [72:0] t9 [512];

  initial begin : watchdog
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int a = 0; a < 513; a++) begin
      if (a < 512) a9 <= 9'(a);
      @(posedge clk);
      if (a >= 1) begin
        int  t, e;
        real xv, k;
        #1;
        t  = a - 1;
        xv = real'(t % 256) / 2.0;
        if (t >= 256) xv = -xv;
        e  = (xv >= 0) ? int'($floor(xv / LN2 + 0.5)) : -int'($floor(-xv / LN2 + 0.5));
        k  = real'(e) * LN2;
        t9[t] = {ep9, kh9, kl9};
        checks++;
        if (int'($signed(ep9)) != e) begin failures++; $display("entry %0d: E'=%0d expected %0d", t, $signed(ep9), e); end
        checks++;
        if (kh9 !== r2sp(k)) begin failures++; $display("entry %0d: K'high %h expected %h", t, kh9, r2sp(k)); end
        checks++;
        if (e != 0 && ((sp2r(kh9) + sp2r(kl9) - k) / k > 2.0 ** -40 || (sp2r(kh9) + sp2r(kl9) - k) / k < -(2.0 ** -40))) begin
          failures++; $display("entry %0d: K'high + K'low off", t);
        end
      end
    end
    for (int a = 0; a < 2049; a++) begin
      if (a < 2048) a11 <= 11'(a);
      @(posedge clk);
      if (a >= 1) begin
        int t, e3, k, mag;
        #1;
        t   = a - 1;
        e3  = (t >> 7) & 7;
        k   = (e3 >= 6) ? e3 - 6 : e3 + 2;            // unbiased exponent + 1
        mag = int'($floor((2.0 ** (k - 1)) * (1.0 + real'(t & 127) / 128.0) * 2.0));
        checks++;
        if ({ep11, kh11, kl11} !== t9[((t >> 10) << 8) | mag]) begin
          failures++; $display("11-bit entry %0d differs from reduced input %0d", t, mag);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
