// log_elog2_rom: table of the first term of ln(x) = E*log(2) + log(m).
//
// Entry a holds (a - 127) * log(2) rounded to binary32, for every 8-bit address;
// the logarithm core addresses it with the biased exponent of x plus the branch
// bit, which is E + 127. A single 256-entry table of correctly rounded products
// replaces a multiplier, as the document describes (one memory block in 256-word
// mode). Entries are computed at elaboration from a 62-bit value of log(2).
// Timing: like an FPGA block memory with registered address and registered
// output, data appears two clock edges after addr.
module log_elog2_rom
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic [7:0]  addr,
  output logic [31:0] data
);

  logic [31:0] rom [256];

  for (genvar a = 0; a < 256; a++) begin : g_rom
    localparam logic [31:0] V = fix_to_fp(q62_t'(a - 127) * Q_LN2);
    assign rom[a] = V;
  end

  logic [7:0] addr_q;
  always_ff @(posedge clk) begin
    addr_q <= addr;
    data   <= rom[addr_q];
  end

endmodule
