// log_rinv_rom: reciprocal table of the logarithm range reduction.
//
// Addressed by t = f[22:14], the top 9 fraction bits of x (f[22] is also the
// branch bit that selects m = 1.f or m = 1.f/2), it returns r_mtop, the
// reciprocal of the leading bits of m, as a 36-bit unsigned fixed-point number
// with one integer and 35 fraction bits: the extended 1 + p + psi precision that
// lets m * r_mtop - 1 be formed without a rounding error. Entries are rounded up
// (see fp_pkg::log_rinv_entry) so that m * r_mtop >= 1. The 36-bit width follows
// the document's 36x34 multiplier; the rounding direction is this design's choice.
// Timing: registered address and output, data two edges after addr.
module log_rinv_rom
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic [8:0]  addr,
  output logic [35:0] data
);

  logic [35:0] rom [512];

  for (genvar t = 0; t < 512; t++) begin : g_rom
    localparam logic [35:0] V = log_rinv_entry(9'(t));
    assign rom[t] = V;
  end

  logic [8:0] addr_q;
  always_ff @(posedge clk) begin
    addr_q <= addr;
    data   <= rom[addr_q];
  end

endmodule
