// tb_fp_log: self-checking testbench of the pipelined logarithm core.
//
// Streams one operand per clock: directed values (1.0, e, powers of two, values
// next to 1 on both sides, the 1.5 branch point, zero, subnormal, negative,
// infinity, NaN) and random positive binary32 numbers over the whole exponent
// range, with extra weight on the region close to 1 and on both branches. Each
// result is compared with ln() in double precision: finite results must be within
// MAX_ULP units in the last place (the accuracy target of the core), exceptional
// results must match exactly. Checks that a result appears exactly 25 cycles
// after its operand and that the close-to-1 path and both branches were used.
module tb_fp_log;
  import tb_fp_pkg::*;

  localparam int  LAT     = 25;
  localparam int  NRAND   = 20000;
  localparam real MAX_ULP = 3.0;   // OpenCL single-precision bound for log and exp

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [31:0] x = '0;
  logic        out_valid;
  logic [31:0] r;

  fp_log dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid), .r(r));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_close = 0, n_br1 = 0, n_br0 = 0, n_special = 0;
  real worst = 0.0;
  logic [31:0] q_x [$];
  int          q_t [$];
  int          cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (NRAND + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [31:0] xv;
      int          t0;
      real         refv;
      real         err;
      logic [31:0] exp_special;
      logic        special;
      xv = q_x.pop_front();
      t0 = q_t.pop_front();
      checks++;
      if (cyc - t0 != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - t0, LAT);
      end
      special = 1'b1;
      exp_special = 32'h0;
      if (isnan32(xv))                  exp_special = 32'h7FC0_0000;
      else if (xv[30:23] == 0)          exp_special = 32'hFF80_0000;
      else if (xv[31])                  exp_special = 32'h7FC0_0000;
      else if (xv[30:23] == 8'hFF)      exp_special = 32'h7F80_0000;
      else                              special = 1'b0;
      checks++;
      if (special) begin
        n_special++;
        if (r !== exp_special) begin
          failures++;
          $display("x=%h: got %h expected %h", xv, r, exp_special);
        end
      end else begin
        refv = $ln(sp2r(xv));
        err = ulp_err(r, refv);
        if (err > worst) worst = err;
        if (xv[22:14] == 9'd0 || xv[22:14] == 9'h1FF) n_close++;
        else if (xv[22]) n_br1++;
        else n_br0++;
        if (err > MAX_ULP) begin
          failures++;
          if (failures < 20) $display("x=%h (%g): got %h (%g) refv %g err %f ulp", xv, sp2r(xv), r, sp2r(r), refv, err);
        end
      end
    end
  end

  task automatic drive(input logic [31:0] v);
    x        <= v;
    in_valid <= 1'b1;
    q_x.push_back(v);
    q_t.push_back(cyc + 1);
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    drive(32'h3F80_0000);  // 1.0
    drive(32'h402D_F854);  // e
    drive(32'h4000_0000);  // 2
    drive(32'h3F00_0000);  // 0.5
    drive(32'h3F7F_FFFF);  // 1 - 2^-24
    drive(32'h3F80_0001);  // 1 + 2^-23
    drive(32'h3F7F_C000);  // just below 1, close
    drive(32'h3F80_3FFF);  // just above 1, close
    drive(32'h3F80_4000);  // first reduced value above 1
    drive(32'h3F7F_BFFF);  // first reduced value below 1
    drive(32'h3FC0_0000);  // 1.5, branch point
    drive(32'h3FBF_FFFF);
    drive(32'h7F7F_FFFF);  // largest finite
    drive(32'h0080_0000);  // smallest normal
    drive(32'h0000_0000);
    drive(32'h8000_0000);
    drive(32'h0000_1234);  // subnormal
    drive(32'hBF80_0000);  // -1
    drive(32'h7F80_0000);
    drive(32'hFF80_0000);
    drive(32'h7FC0_0000);
    for (int k = 0; k < NRAND; k++) begin
      case ($urandom_range(3))
        0:       v = rand_fp(1'b0, -126, 127);
        1:       v = {1'b0, 8'(126 + $urandom_range(1)), 23'($urandom)};
        2:       v = {1'b0, 8'(126 + $urandom_range(1)), ($urandom_range(1) ? 9'h1FF : 9'h000), 14'($urandom)};
        default: v = {1'b0, 8'($urandom_range(254, 1)), 23'($urandom)};
      endcase
      drive(v);
    end
    in_valid <= 1'b0;
    repeat (LAT + 5) @(posedge clk);
    $display("worst error %f ulp; close %0d, branch1 %0d, branch0 %0d, special %0d",
             worst, n_close, n_br1, n_br0, n_special);
    checks++;
    if (q_x.size() != 0 || n_close == 0 || n_br1 == 0 || n_br0 == 0 || n_special == 0) begin
      failures++;
      $display("missing results or an unexercised path");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
