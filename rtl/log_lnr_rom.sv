// log_lnr_rom: table of log(r_mtop), the third term of the logarithm.
//
// Same address as log_rinv_rom (t = f[22:14]); entry t is the natural log of the
// stored reciprocal log_rinv_entry(t), rounded to binary32. Taking the log of the
// stored value, not of the exact reciprocal, makes log(m) = log(m*r) - log(r)
// hold exactly for the reciprocal the multiplier actually uses.
// Timing: registered address and output, data two edges after addr.
module log_lnr_rom
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic [8:0]  addr,
  output logic [31:0] data
);

  logic [31:0] rom [512];

  for (genvar t = 0; t < 512; t++) begin : g_rom
    localparam logic [31:0] V = fix_to_fp(fix_ln(q62_t'(log_rinv_entry(9'(t))) <<< 27));
    assign rom[t] = V;
  end

  logic [8:0] addr_q;
  always_ff @(posedge clk) begin
    addr_q <= addr;
    data   <= rom[addr_q];
  end

endmodule
