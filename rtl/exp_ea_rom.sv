// exp_ea_rom: table of e^A for the exponential.
//
// Address {s, mag[8:0]} is A = (-1)^s * mag / 256 (1 integer and 8 fraction
// bits), as made by exp_find_a; entry = e^A rounded to binary32, computed at
// elaboration by a Q62 Taylor series. 1024 entries, as the document's two block
// memories in 1024-word mode.
// Timing: registered address and output, data two edges after addr.
module exp_ea_rom
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic [9:0]  addr,
  output logic [31:0] data
);

  logic [31:0] rom [1024];

  for (genvar a = 0; a < 1024; a++) begin : g_rom
    localparam q62_t        AV = (a >= 512) ? -(q62_t'(a - 512) <<< (QF - 8))
                                            :  (q62_t'(a) <<< (QF - 8));
    localparam logic [31:0] V  = fix_to_fp(fix_exp(AV));
    assign rom[a] = V;
  end

  logic [9:0] addr_q;
  always_ff @(posedge clk) begin
    addr_q <= addr;
    data   <= rom[addr_q];
  end

endmodule
