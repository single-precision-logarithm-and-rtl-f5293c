// tb_log_elog2_rom: reads all 256 entries of the E*log(2) table and compares each
// with (a - 127) * ln(2) computed in double precision and rounded to binary32.
// Checks the two-cycle read latency by presenting addresses back to back.
module tb_log_elog2_rom;
  import tb_fp_pkg::*;
  logic        clk = 1'b0;
  logic [7:0]  addr = '0;
  logic [31:0] data;
  log_elog2_rom dut (.clk(clk), .addr(addr), .data(data));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int a = 0; a < 257; a++) begin
      if (a < 256) addr <= 8'(a);
      @(posedge clk);
      if (a >= 1) begin
        logic [31:0] e;
        #1;
        e = r2sp(real'(a - 1 - 127) * 0.69314718055994530942);
        checks++;
        if (data !== e) begin failures++; $display("entry %0d: got %h expected %h", a - 1, data, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
