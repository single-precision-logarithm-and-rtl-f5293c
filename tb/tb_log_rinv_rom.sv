// tb_log_rinv_rom: reads all 512 reciprocal entries and checks, with integer
// arithmetic only, that entry t is the smallest 1.35 fixed-point r with
// m_top * r >= 1, m_top being 1.t (t[8] = 0) or (1.t)/2 (t[8] = 1). Also checks
// that m * r - 1 < 2^-9 for the largest m with those leading bits.
module tb_log_rinv_rom;
  logic        clk = 1'b0;
  logic [8:0]  addr = '0;
  logic [35:0] data;
  log_rinv_rom dut (.clk(clk), .addr(addr), .data(data));
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
    for (int a = 0; a < 513; a++) begin
      if (a < 512) addr <= 9'(a);
      @(posedge clk);
      if (a >= 1) begin
        int          t;
        logic [95:0] mt;      // m_top with 10 fraction bits
        logic [95:0] mmax;    // largest m (25-bit, 24 fraction bits) with these top bits
        logic [95:0] one;
        #1;
        t    = a - 1;
        mt   = (t >= 256) ? 96'(512 + t) : 96'(2 * (512 + t));
        one  = 96'd1 << 45;   // 1.0 with 10 + 35 fraction bits
        checks++;
        if (!(mt * 96'(data) >= one && mt * 96'(data - 36'd1) < one)) begin
          failures++; $display("entry %0d: %h is not the rounded-up reciprocal", t, data);
        end
        mmax = (mt << 14) + ((t >= 256) ? 96'd16383 : 96'd32767);   // 24 fraction bits
        checks++;
        if (mmax * 96'(data) - (96'd1 << 59) >= (96'd1 << 50)) begin
          failures++; $display("entry %0d: m*r - 1 not below 2^-9", t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
