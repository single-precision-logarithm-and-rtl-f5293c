// tb_fxp_mult: self-checking testbench of the 36x34 fixed-point multiplier.
// Random operands every clock (plus all-ones and zero); the expected product is
// built here from 18-bit partial products, and must appear two cycles later.
module tb_fxp_mult;
  localparam int N = 5000;
  logic        clk = 1'b0;
  logic [35:0] a = '0;
  logic [33:0] b = '0;
  logic [69:0] p;
  fxp_mult #(.AW(36), .BW(34)) dut (.clk(clk), .a(a), .b(b), .p(p));
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  logic [69:0] q_p [$];
  int          q_t [$];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [69:0] ref_mul(input logic [35:0] u, input logic [33:0] v);
    logic [69:0] acc;
    acc = '0;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        acc = acc + ((70'(u[18*i +: 18]) * 70'(j == 0 ? v[16:0] : {1'b0, v[33:17]})) << (18*i + 17*j));
    return acc;
  endfunction

  always @(posedge clk) begin
    if (q_t.size() > 0 && cyc - q_t[0] == 2) begin
      logic [69:0] e;
      void'(q_t.pop_front());
      e = q_p.pop_front();
      checks++;
      if (p !== e) begin failures++; $display("got %h expected %h", p, e); end
    end
  end

  initial begin
    logic [35:0] u;
    logic [33:0] v;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      u = {$urandom, $urandom};
      v = {$urandom, $urandom};
      if (k == 0) begin u = '1; v = '1; end
      if (k == 1) begin u = '0; end
      a <= u; b <= v;
      q_p.push_back(ref_mul(u, v));
      q_t.push_back(cyc + 1);
      @(posedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (q_t.size() != 0) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
