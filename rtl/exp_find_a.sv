// exp_find_a: splits y' into A + B for the exponential's argument reduction.
//
// A keeps the bits of y' of weight 2^-8 and above, so B = y' - A satisfies
// |B| < 2^-8 and e^B needs only a degree-2 polynomial. Two forms of A are made:
//  - a_fp, binary32: y' with its fraction ANDed with an 8-bit mask chosen by the
//    4 exponent LSBs of y' (the mask table below); bits under the top 8 fraction
//    bits are always cleared. For y' < 2^-8 the exponent is cleared, so A = 0 and
//    B = y'.
//  - a_addr, fixed point: sign, 1 integer bit and 8 fraction bits of A, made by a
//    9-bit right shifter (shift 0 .. 8) of {1, f[22:15]}; it addresses the e^A
//    table. For y' < 2^-8 it is zero.
// Mask table: exponent ey of y' in 0 .. -8 (biased 127 .. 119, LSBs F .. 7)
// keeps ey + 8 top fraction bits: 11111111, 11111110, ... 00000000; the unused
// LSB codes 0 .. 6 keep all 8. Masking and shifting follow the document; the
// two-state handling of unused codes is this design's choice.
// Timing: one register, outputs one clock edge after y.
module exp_find_a (
  input  logic        clk,
  input  logic [31:0] y,
  output logic [31:0] a_fp,
  output logic [9:0]  a_addr
);

  logic [7:0] mask;
  logic       tiny;
  logic [8:0] mag;

  always_comb begin
    mask  = (y[26:23] >= 4'd7) ? 8'hFF << (4'd15 - y[26:23]) : 8'hFF;
    tiny = y[30:23] < 8'd119;
    mag   = 9'd0;
    if (!tiny) begin
      if (y[30:23] >= 8'd127) mag = {1'b1, y[22:15]};
      else                    mag = {1'b1, y[22:15]} >> (8'd127 - y[30:23]);
    end
  end

  always_ff @(posedge clk) begin
    a_fp   <= tiny ? {y[31], 31'd0} : {y[31], y[30:23], y[22:15] & mask, 15'd0};
    a_addr <= {y[31], mag};
  end

endmodule
