// exp_k_rom: the exponential's table of E' and K' = E' * log(2).
//
// For the reduced input x_fxpRed = (-1)^s * mag/2 the table returns
//   E'     = round(x_fxpRed / log 2), 9-bit two's complement, and
//   K'     = E' * log(2) as the unevaluated sum K'high + K'low of two binary32
//            numbers: K'high is K' rounded to binary32 and K'low is the rounded
//            remainder, so the pair carries about 48 bits of K'.
// Fusing the constant multiplications by 1/log 2 and log 2 into one table keyed
// by x_fxpRed is the document's method; storing E' in the same table is one of
// the two options it gives (the other is a constant multiplier).
// AW selects the addressing:
//   AW = 9   address is x_fxpRed = {s, mag[7:0]} from exp_xred_shift (Arch1);
//   AW = 11  address is {s, e[2:0], f[22:16]} taken straight from x (Arch3); the
//            table decodes the 3 exponent bits (ex = -1 .. 6) into the shift.
// In the 11-bit form addresses of inputs with ex <= -2 alias other entries; the
// core masks K' to zero for those.
// Timing: registered address and output, data two edges after addr.
module exp_k_rom
  import fp_pkg::*;
#(
  parameter int AW = 9
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [8:0]    e_prime,
  output logic [31:0]   k_high,
  output logic [31:0]   k_low
);

  localparam int DEPTH = 1 << AW;

  // Magnitude floor(|x|*2) decoded from a table address.
  function automatic int addr_mag(input int a);
    int e3;
    int k;
    if (AW == 9) return a & 255;
    e3 = (a >> 7) & 7;                      // biased exponent mod 8
    k  = (e3 >= 6) ? e3 - 6 : e3 + 2;       // ex + 1, 0 .. 7
    return (128 + (a & 127)) >> (7 - k);
  endfunction

  function automatic logic [72:0] entry(input int a);
    q62_t        ep;
    q62_t        kv;
    logic [31:0] kh;
    logic [31:0] kl;
    logic        s;
    s  = ((a >> (AW - 1)) & 1) == 1;
    ep = ((q62_t'(addr_mag(a)) <<< (QF - 1)) + (Q_LN2 >>> 1)) / Q_LN2;
    if (s) ep = -ep;
    kv = ep * Q_LN2;
    kh = fix_to_fp(kv);
    kl = fix_to_fp(kv - fp_to_fix(kh));
    return {ep[8:0], kh, kl};
  endfunction

  logic [72:0] rom [DEPTH];

  for (genvar a = 0; a < DEPTH; a++) begin : g_rom
    localparam logic [72:0] V = entry(a);
    assign rom[a] = V;
  end

  logic [AW-1:0] addr_q;
  logic [72:0]   data_q;
  always_ff @(posedge clk) begin
    addr_q <= addr;
    data_q <= rom[addr_q];
  end

  assign {e_prime, k_high, k_low} = data_q;

endmodule
