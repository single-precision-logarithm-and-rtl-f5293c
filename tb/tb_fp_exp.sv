// tb_fp_exp: self-checking testbench of the pipelined exponential core.
//
// Runs three instances side by side on the same operand stream: ARCH = 1
// (shifter-addressed K' table), ARCH = 2 (e^A straight from a 12-bit table) and
// ARCH = 3 (K' table addressed straight from x). The stream holds
// directed values (0, +/-1, small and tiny arguments, ln 2 multiples, the edges of
// the finite range, overflow and underflow, infinities, NaN) and random binary32
// numbers in (-87.3, 88.7) and in |x| < 1/2. Finite results are compared with
// exp() in double precision and must be within MAX_ULP units in the last place;
// exceptional results must match exactly. Checks the latencies (25, 25 and 24
// cycles) and that all three instances agree bit for bit.
module tb_fp_exp;
  import tb_fp_pkg::*;

  localparam int  NRAND   = 20000;
  localparam real MAX_ULP = 3.0;   // OpenCL single-precision bound for log and exp

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [31:0] x = '0;
  logic        v1, v2, v3;
  logic [31:0] r1, r2, r3;

  fp_exp #(.ARCH(1)) dut1 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(v1), .r(r1));
  fp_exp #(.ARCH(2)) dut2 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(v2), .r(r2));
  fp_exp #(.ARCH(3)) dut3 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(v3), .r(r3));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_tiny = 0, n_norm = 0;
  real worst = 0.0;
  logic [31:0] q1_x [$], q3_x [$], q3_r [$];
  int          q1_t [$], q3_t [$];
  int          cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (NRAND + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check_one(input logic [31:0] xv, input logic [31:0] got, input int arch);
    real refv;
    real err;
    real xr;
    checks++;
    xr = sp2r(xv);
    if (isnan32(xv)) begin
      if (got !== 32'h7FC0_0000) begin failures++; $display("arch%0d NaN in: got %h", arch, got); end
      return;
    end
    if (xv[30:23] == 8'hFF || xr >= 88.8 || xr <= -104.0) begin
      if (arch == 1) begin if (xv[31]) n_unf++; else n_ovf++; end
      if (got !== (xv[31] ? 32'h0 : 32'h7F80_0000)) begin
        failures++; $display("arch%0d x=%h: got %h, expected overflow/underflow", arch, xv, got);
      end
      return;
    end
    refv = $exp(xr);
    if (refv < 1.1754943508222875e-38 * 1.0001 && refv > 1.1754943508222875e-38 * 0.9999) return; // flush boundary
    if (refv < 1.1754943508222875e-38) begin
      if (arch == 1) n_unf++;
      if (got !== 32'h0) begin failures++; $display("arch%0d x=%h: got %h, expected 0", arch, xv, got); end
      return;
    end
    if (refv > 3.4028234663852886e38) begin
      if (arch == 1) n_ovf++;
      if (got !== 32'h7F80_0000) begin failures++; $display("arch%0d x=%h: got %h, expected inf", arch, xv, got); end
      return;
    end
    if (arch == 1) begin if (xv[30:23] < 126) n_tiny++; else n_norm++; end
    err = ulp_err(got, refv);
    if (err > worst) worst = err;
    if (err > MAX_ULP) begin
      failures++;
      if (failures < 20) $display("arch%0d x=%h (%g): got %h (%g) ref %g err %f ulp", arch, xv, xr, got, sp2r(got), refv, err);
    end
  endfunction

  always @(posedge clk) begin
    if (rst_n && v1) begin
      logic [31:0] xv;
      int t0;
      xv = q1_x.pop_front(); t0 = q1_t.pop_front();
      checks++;
      if (cyc - t0 != 25) begin failures++; $display("arch1 latency %0d", cyc - t0); end
      check_one(xv, r1, 1);
      checks++;
      if (q3_r.size() == 0 || q3_r.pop_front() !== r1) begin failures++; $display("arch1/arch3 mismatch x=%h", xv); end
      checks++;
      if (!v2 || r2 !== r1) begin failures++; $display("arch1/arch2 mismatch x=%h: %h %h", xv, r1, r2); end
    end
    if (rst_n && v3) begin
      logic [31:0] xv;
      int t0;
      xv = q3_x.pop_front(); t0 = q3_t.pop_front();
      checks++;
      if (cyc - t0 != 24) begin failures++; $display("arch3 latency %0d", cyc - t0); end
      check_one(xv, r3, 3);
      q3_r.push_back(r3);
    end
  end

  task automatic drive(input logic [31:0] v);
    x        <= v;
    in_valid <= 1'b1;
    q1_x.push_back(v); q3_x.push_back(v);
    q1_t.push_back(cyc + 1); q3_t.push_back(cyc + 1);
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    drive(32'h0000_0000); drive(32'h8000_0000); drive(32'h0000_0042);
    drive(32'h3F80_0000); drive(32'hBF80_0000); drive(32'h3F31_7218); // ln 2
    drive(32'h3B80_0000); drive(32'h3380_0000); drive(32'hB380_0000);
    drive(32'h42B1_7217); drive(32'h42B1_7218); drive(32'h42B2_0000); // ~88.72
    drive(32'hC2AE_AC4F); drive(32'hC2AE_AC50); drive(32'hC2B0_0000); // ~-87.34
    drive(32'h4300_0000); drive(32'hC300_0000); drive(32'h7F7F_FFFF); drive(32'hFF7F_FFFF);
    drive(32'h7F80_0000); drive(32'hFF80_0000); drive(32'h7FC0_0000);
    drive(32'h3EFF_FFFF); drive(32'h3F00_0000); drive(32'hBF00_0000);
    for (int k = 0; k < NRAND; k++) begin
      real xr;
      case ($urandom_range(2))
        0: begin
          xr = -87.3 + 176.0 * real'($urandom) / 4294967296.0;
          v  = r2sp(xr);
        end
        1:       v = rand_fp(1'($urandom), -30, -2);
        default: v = rand_fp(1'($urandom), -2, 6);
      endcase
      drive(v);
    end
    in_valid <= 1'b0;
    repeat (30) @(posedge clk);
    $display("worst error %f ulp; normal %0d, |x|<1/2 %0d, overflow %0d, underflow %0d",
             worst, n_norm, n_tiny, n_ovf, n_unf);
    checks++;
    if (q1_x.size() != 0 || q3_x.size() != 0 || n_norm == 0 || n_tiny == 0 || n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("missing results or an unexercised path");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
