// tb_exp_ea12_rom: self-checking testbench of the 12-bit e^A table (Arch2).
//
// Feeds y' values and checks the entry read two cycles later against exp(A)
// computed in double precision, where A is y' truncated toward zero to a multiple
// of 2^-8: within half an ulp plus the double's own error. Operands: every
// multiple of 2^-8 in (-1.05, 1.05), each plus a random fraction of 2^-8 (so the
// address must drop the bits below A); random y' of any exponent from -30 to 0
// with |y'| < 1.5 (tiny ones must give 1.0); and +/-0. The two-cycle latency is
// checked by the alignment of the operand queue.
module tb_exp_ea12_rom;
  import tb_fp_pkg::*;
  logic        clk = 1'b0;
  logic [31:0] y = '0;
  logic [31:0] data;
  exp_ea12_rom dut (.clk(clk), .y(y), .data(data));
  always #5 clk = ~clk;
  int  checks = 0, failures = 0;
  real worst = 0.0;
  logic [31:0] q [$];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // y is applied one edge after drive() queues it, and its entry is on data two
  // edges later; this block samples before those edges update, so the queue
  // holds three operands in flight
  always @(posedge clk) begin
    if (q.size() > 3) begin
      logic [31:0] yv;
      real yr, ar, ev, err;
      yv = q.pop_front();
      yr = sp2r(yv);
      ar = real'($rtoi(yr * 256.0)) / 256.0;   // truncation toward zero
      ev = $exp(ar);
      err = ulp_err(data, ev);
      if (err > worst) worst = err;
      checks++;
      if (err > 0.5001) begin
        failures++;
        if (failures < 20) $display("y=%h (%g): got %h, exp(%g) = %g, err %f", yv, yr, data, ar, ev, err);
      end
    end
  end

  task automatic drive(input logic [31:0] v);
    y <= v;
    q.push_back(v);
    @(posedge clk);
  endtask

  initial begin
    @(posedge clk);
    drive(32'h0000_0000);
    drive(32'h8000_0000);
    for (int k = -268; k <= 268; k++) begin
      real base, fr;
      base = real'(k) / 256.0;
      fr   = real'($urandom_range(1000)) / 1001.0 / 256.0;
      drive(r2sp(base));
      drive(r2sp(base + ((k < 0) ? -fr : fr)));
    end
    for (int k = 0; k < 5000; k++) begin
      logic [31:0] v;
      v = rand_fp(1'($urandom), -30, 0);
      if (v[30:23] == 8'd127) v[22] = 1'b0;   // keep |y'| < 1.5, the table's domain
      drive(v);
    end
    repeat (4) @(posedge clk);
    $display("worst %f ulp", worst);
    checks++;
    if (q.size() > 3) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
