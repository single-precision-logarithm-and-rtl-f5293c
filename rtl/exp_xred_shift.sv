// exp_xred_shift: reduced fixed-point input of the exponential (x_fxpRed).
//
// Given binary32 x = (-1)^s * 2^ex * 1.f, it produces x_fxpRed: the sign and an
// 8-bit magnitude with 7 integer bits and 1 fraction bit, floor(|x| * 2). Only the
// implicit one and the top 7 fraction bits of x can reach this window, so the
// shifter is 8 bits wide with 8 positions (ex = -1 .. 6) instead of a 33-bit
// barrel shifter. |x| < 1/2 (ex <= -2, zero and subnormals included) gives a zero
// magnitude. ovf flags |x| >= 128, infinity and NaN (ex >= 7), whose results are
// decided apart from the datapath. Format and window follow the document; the
// flag covering inf/NaN as well is this design's choice.
// Timing: one register, outputs one clock edge after x.
module exp_xred_shift (
  input  logic        clk,
  input  logic [31:0] x,
  output logic [8:0]  xred,
  output logic        ovf
);

  logic [7:0] mag;
  logic [2:0] sh;

  always_comb begin
    sh  = 3'd0;
    mag = 8'd0;
    if (x[30:23] >= 8'd126 && x[30:23] <= 8'd133) begin
      sh  = 3'(8'd133 - x[30:23]);        // 7 - (ex + 1)
      mag = {1'b1, x[22:16]} >> sh;
    end
  end

  always_ff @(posedge clk) begin
    xred <= {x[31], mag};
    ovf  <= x[30:23] >= 8'd134;
  end

endmodule
