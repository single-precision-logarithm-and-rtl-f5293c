// tb_exp_find_a: checks the split y' = A + B of the exponential.
// For random y' over the range the core produces (|y'| < 1.1, including values
// below 2^-8, zero and subnormals), one cycle after the input:
//  - A (binary32) times 256 is an integer, has the sign of y' and |A| <= |y'|;
//  - |y' - A| < 2^-8, so B is small enough for the degree-2 polynomial;
//  - the fixed-point address equals A: sign bit, then |A| * 256 on 9 bits.
module tb_exp_find_a;
  import tb_fp_pkg::*;
  localparam int N = 5000;
  logic        clk = 1'b0;
  logic [31:0] y = '0;
  logic [31:0] a_fp;
  logic [9:0]  a_addr;
  exp_find_a dut (.clk(clk), .y(y), .a_fp(a_fp), .a_addr(a_addr));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_zero = 0, n_nonzero = 0;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    real yv, av, a256;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      case (k)
        0: v = 32'h0;
        1: v = 32'h8000_0000;
        2: v = 32'h3B80_0000;       // 2^-8
        3: v = 32'h3B7F_FFFF;       // just below 2^-8
        4: v = 32'h3F80_0000;       // 1.0
        default: v = rand_fp(1'($urandom), -14, 0);
      endcase
      y <= v;
      @(posedge clk);
      #1;
      yv   = sp2r(v);
      av   = sp2r(a_fp);
      a256 = av * 256.0;
      if (av == 0.0) n_zero++; else n_nonzero++;
      checks++;
      if (a256 != $floor(a256) || (av != 0.0 && (a_fp[31] != v[31])) || (av < 0 ? -av : av) > (yv < 0 ? -yv : yv)) begin
        failures++; $display("y=%h: A=%h not the leading part", v, a_fp);
      end
      checks++;
      if ((yv - av) >= 2.0 ** -8 || (yv - av) <= -(2.0 ** -8)) begin
        failures++; $display("y=%h: B = %g too large", v, yv - av);
      end
      checks++;
      if (real'(a_addr[8:0]) != (a256 < 0 ? -a256 : a256) || (av != 0.0 && a_addr[9] != v[31])) begin
        failures++; $display("y=%h: address %h does not match A=%g", v, a_addr, av);
      end
    end
    checks++;
    if (n_zero == 0 || n_nonzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
