// fp_pkg: types, constants and elaboration-time helper functions shared by the
// single-precision logarithm and exponential cores.
//
// Numbers are IEEE-754 binary32. Every core flushes subnormal inputs and outputs
// to zero, as the hard floating-point DSP blocks the design maps to do.
//
// The table contents of the cores are not stored as data files: they are worked
// out while the design elaborates, by the functions below, using only integer
// arithmetic on 128-bit signed fixed-point values with 62 fraction bits (Q62):
//   fix_ln   natural log of a value near 1, by ln(v) = 2*atanh((v-1)/(v+1))
//   fix_exp  exponential of a value in (-2, 2), by its Taylor series
//   fix_to_fp / fp_to_fix  round a Q62 value to binary32 (nearest-even) and back
// The Q62 precision (2^-62) is far finer than the binary32 entries, so every table
// entry is the correctly rounded value of the exact quantity.
package fp_pkg;

  typedef struct packed {
    logic        s;
    logic [7:0]  e;
    logic [22:0] f;
  } fp32_t;

  localparam logic [31:0] FP_ZERO    = 32'h0000_0000;
  localparam logic [31:0] FP_ONE     = 32'h3F80_0000;
  localparam logic [31:0] FP_HALF    = 32'h3F00_0000;
  localparam logic [31:0] FP_MHALF   = 32'hBF00_0000;
  localparam logic [31:0] FP_THIRD   = 32'h3EAA_AAAB;   // 1/3 rounded to nearest
  localparam logic [31:0] FP_ONE_ULP = 32'h3F80_0001;   // 1 + 2^-23
  localparam logic [31:0] FP_PINF    = 32'h7F80_0000;
  localparam logic [31:0] FP_NINF    = 32'hFF80_0000;
  localparam logic [31:0] FP_QNAN    = 32'h7FC0_0000;

  // Operation of a hard floating-point DSP block.
  typedef enum logic [1:0] {
    HFP_MULADD = 2'd0,   // r = x*y +/- z, four pipeline stages
    HFP_ADD    = 2'd1,   // r = y +/- z,   three pipeline stages
    HFP_MUL    = 2'd2    // r = x*y,       three pipeline stages
  } hfp_mode_e;

  typedef logic signed [127:0] q62_t;
  localparam int  QF  = 62;
  localparam q62_t Q_ONE = q62_t'(1) <<< QF;
  // log(2) rounded to 62 fraction bits
  localparam q62_t Q_LN2 = q62_t'(64'h2C5C_85FD_F473_DE6B);

  function automatic logic is_nan(input logic [31:0] a);
    return (a[30:23] == 8'hFF) && (a[22:0] != 0);
  endfunction

  function automatic logic is_inf(input logic [31:0] a);
    return (a[30:23] == 8'hFF) && (a[22:0] == 0);
  endfunction

  // True for +/-0 and for subnormals, which are read as zero.
  function automatic logic is_zero(input logic [31:0] a);
    return a[30:23] == 8'h00;
  endfunction

  // Round a signed Q62 value to the nearest binary32 (ties to even). Results
  // below the normal range flush to signed zero, results above it give infinity.
  function automatic logic [31:0] fix_to_fp(input q62_t v);
    logic         s;
    q62_t         mag;
    int           msb;
    int           ex;
    logic [127:0] keep;
    logic [127:0] rest;
    logic [127:0] half;
    logic [24:0]  man;
    s   = v < 0;
    mag = s ? -v : v;
    if (mag == 0) return {s, 31'd0};
    msb = 0;
    for (int b = 0; b < 127; b++) if (mag[b]) msb = b;
    ex = msb - QF;
    if (msb > 23) begin
      keep = 128'(mag) >> (msb - 23);
      rest = 128'(mag) & ((128'd1 << (msb - 23)) - 128'd1);
      half = 128'd1 << (msb - 24);
      man  = keep[24:0];
      if (rest > half || (rest == half && man[0])) man = man + 25'd1;
      if (man[24]) begin
        man = man >> 1;
        ex  = ex + 1;
      end
    end else begin
      keep = 128'(mag) << (23 - msb);
      man  = keep[24:0];
    end
    if (ex + 127 <= 0)   return {s, 31'd0};
    if (ex + 127 >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(ex + 127), man[22:0]};
  endfunction

  // Exact Q62 value of a normal binary32 number of magnitude below 2^64 (bits
  // below 2^-62 are dropped; zero and subnormals give 0).
  function automatic q62_t fp_to_fix(input logic [31:0] a);
    q62_t m;
    int   sh;
    if (a[30:23] == 8'h00) return '0;
    m  = q62_t'({1'b1, a[22:0]});
    sh = int'(a[30:23]) - 127 - 23 + QF;
    if (sh >= 0) m = m <<< sh;
    else         m = m >>> (-sh);
    return a[31] ? -m : m;
  endfunction

  // ln(v) for v in roughly (0.5, 2), v and result in Q62.
  function automatic q62_t fix_ln(input q62_t v);
    q62_t z;
    q62_t z2;
    q62_t t;
    q62_t sum;
    z   = ((v - Q_ONE) <<< QF) / (v + Q_ONE);
    z2  = (z * z) >>> QF;
    t   = z;
    sum = z;
    for (int k = 1; k < 24; k++) begin
      t   = (t * z2) >>> QF;
      sum = sum + t / q62_t'(2 * k + 1);
    end
    return sum <<< 1;
  endfunction

  // e^a for a in (-2, 2), a and result in Q62.
  function automatic q62_t fix_exp(input q62_t a);
    q62_t mag;
    q62_t t;
    q62_t sum;
    mag = (a < 0) ? -a : a;
    t   = Q_ONE;
    sum = Q_ONE;
    for (int n = 1; n < 40; n++) begin
      t   = ((t * mag) >>> QF) / q62_t'(n);
      sum = sum + t;
    end
    if (a < 0) sum = (Q_ONE <<< QF) / sum;
    return sum;
  endfunction

  // Reciprocal table entry of the logarithm core: r_mtop for index t = f[22:14],
  // as an unsigned fixed-point value with 35 fraction bits, rounded up. With
  // t[8] = f[22] = 0 the leading bits of m are 1.t (m = 1.f); with t[8] = 1 they are
  // (1.t)/2 (m = 1.f/2). Rounding up keeps m * r_mtop >= 1.
  function automatic logic [35:0] log_rinv_entry(input logic [8:0] t);
    logic [63:0] num;
    logic [63:0] den;
    num = 64'd1 << (44 + int'(t[8]));
    den = 64'd512 + 64'(t);
    return 36'((num + den - 64'd1) / den);
  endfunction

endpackage
