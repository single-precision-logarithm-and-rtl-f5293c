// tb_log_lnr_rom: reads all 512 entries of the log(r_mtop) table together with the
// reciprocal table and checks each against ln(r) computed in double precision:
// within half an ulp plus the double's own error (the entries are rounded to
// nearest). Both tables are read with the same address, as in the core.
module tb_log_lnr_rom;
  import tb_fp_pkg::*;
  logic        clk = 1'b0;
  logic [8:0]  addr = '0;
  logic [31:0] data;
  logic [35:0] rinv;
  log_lnr_rom  dut  (.clk(clk), .addr(addr), .data(data));
  log_rinv_rom urinv (.clk(clk), .addr(addr), .data(rinv));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real worst = 0.0;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int a = 0; a < 513; a++) begin
      if (a < 512) addr <= 9'(a);
      @(posedge clk);
      if (a >= 1) begin
        real rv, lv, err;
        #1;
        rv  = real'(rinv) / (2.0 ** 35);
        lv  = $ln(rv);
        err = ulp_err(data, lv);
        if (err > worst) worst = err;
        checks++;
        if (err > 0.5001) begin failures++; $display("entry %0d: got %h ln %g err %f", a - 1, data, lv, err); end
      end
    end
    $display("worst %f ulp", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
