// tb_exp_xred_shift: checks the reduced fixed-point input of the exponential.
// For random x of every exponent (and zero, subnormal, inf, NaN), the magnitude
// must equal floor(|x| * 2) computed in double precision when |x| < 128, the sign
// must be copied, and ovf must be set exactly when |x| >= 128 or x is inf/NaN.
// Outputs are checked one cycle after the input.
module tb_exp_xred_shift;
  import tb_fp_pkg::*;
  localparam int N = 4000;
  logic        clk = 1'b0;
  logic [31:0] x = '0;
  logic [8:0]  xred;
  logic        ovf;
  exp_xred_shift dut (.clk(clk), .x(x), .xred(xred), .ovf(ovf));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    real         mag;
    logic        eo;
    logic [7:0]  em;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      case (k)
        0: v = 32'h0;
        1: v = 32'h8000_0001;
        2: v = 32'h7F80_0000;
        3: v = 32'h7FC0_0000;
        4: v = 32'h42FF_FFFF;    // just below 128
        5: v = 32'h4300_0000;    // 128
        6: v = 32'h3F00_0000;    // 0.5
        7: v = 32'h3EFF_FFFF;    // just below 0.5
        default: v = rand_fp(1'($urandom), -4, 8);
      endcase
      x <= v;
      @(posedge clk);
      #1;
      eo  = (v[30:23] == 8'hFF) || sp2r({1'b0, v[30:0]}) >= 128.0;
      mag = eo ? 0.0 : $floor(sp2r({1'b0, v[30:0]}) * 2.0);
      em  = 8'(int'(mag));
      checks++;
      if (ovf !== eo || (!eo && (xred !== {v[31], em}))) begin
        failures++;
        $display("x=%h: got xred=%h ovf=%b expected %h %b", v, xred, ovf, {v[31], em}, eo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
