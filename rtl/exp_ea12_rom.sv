// exp_ea12_rom: e^A looked up straight from the bits of y' (the Arch2 variant
// of the exponential).
//
// In the default exponential, A is first made as a fixed-point number by a
// small shifter (exp_find_a) and then addresses a 1024-entry table. This table
// skips the shifter. Its 12-bit address is taken from the floating-point y'
// with no alignment at all: {sign, exponent LSBs e[3:0], 7 fraction bits}.
// A = y' with every bit of weight below 2^-8 cleared:
//  - y' exponent -8 .. -1 (e[3:0] = 7 .. 14): A = 2^(e-127) * 1.g, g = f[22:16]
//    masked to the bits of weight >= 2^-8 (the same mask table as exp_find_a);
//  - y' exponent 0 (e[3:0] = 15): A = 1 + g/256 with g = f[21:15]; f[22] is
//    always 0 there because |y'| < 1.05;
//  - |y'| < 2^-8: A = 0, address {s, 0000, 0000000}, entry 1.0.
// Entries with e[3:0] = 0 .. 6 hold 1.0. Each entry is e^A rounded to nearest
// binary32, worked out at elaboration like the other tables. 4096 entries.
// The idea of a 12-bit table fed by exponent and fraction bits of y' is the
// document's; which bits form the address is this design's choice, made so
// that every A value has its own entry and equals the A that exp_find_a builds.
// Timing: the address is formed combinationally and registered; data two clock
// edges after y.
module exp_ea12_rom
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic [31:0] y,
  output logic [31:0] data
);

  logic [31:0] rom [4096];

  for (genvar a = 0; a < 4096; a++) begin : g_rom
    localparam int   E4 = (a >> 7) & 15;
    localparam int   G  = a & 127;
    localparam q62_t MG = (E4 < 7)   ? q62_t'(0)
                        : (E4 == 15) ? ((q62_t'(G) + q62_t'(256)) <<< (QF - 8))
                        :              ((q62_t'(G) + q62_t'(128)) <<< (QF - 22 + E4));
    localparam q62_t        AV = (a >= 2048) ? -MG : MG;
    localparam logic [31:0] V  = fix_to_fp(fix_exp(AV));
    assign rom[a] = V;
  end

  logic [11:0] addr;
  always_comb begin
    logic [7:0] mask;
    mask = (y[26:23] >= 4'd7) ? 8'hFF << (4'd15 - y[26:23]) : 8'hFF;
    if (y[30:23] < 8'd119)       addr = {y[31], 11'd0};
    else if (y[30:23] >= 8'd127) addr = {y[31], 4'hF, y[21:15]};
    else                         addr = {y[31], y[26:23], y[22:16] & mask[7:1]};
  end

  logic [11:0] addr_q;
  always_ff @(posedge clk) begin
    addr_q <= addr;
    data   <= rom[addr_q];
  end

endmodule
