// tb_exp_ea_rom: reads all 1024 entries of the e^A table and compares each with
// exp(A), A = (-1)^s * mag/256, computed in double precision: within half an ulp
// plus the double's own error (entries are rounded to nearest).
module tb_exp_ea_rom;
  import tb_fp_pkg::*;
  logic        clk = 1'b0;
  logic [9:0]  addr = '0;
  logic [31:0] data;
  exp_ea_rom dut (.clk(clk), .addr(addr), .data(data));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real worst = 0.0;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int a = 0; a < 1025; a++) begin
      if (a < 1024) addr <= 10'(a);
      @(posedge clk);
      if (a >= 1) begin
        real av, ev, err;
        int  t;
        #1;
        t   = a - 1;
        av  = real'(t % 512) / 256.0;
        if (t >= 512) av = -av;
        ev  = $exp(av);
        err = ulp_err(data, ev);
        if (err > worst) worst = err;
        checks++;
        if (err > 0.5001) begin failures++; $display("entry %0d: got %h exp %g err %f", t, data, ev, err); end
      end
    end
    $display("worst %f ulp", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
