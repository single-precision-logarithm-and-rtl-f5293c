// pipe_delay: N-stage register chain used to keep side signals aligned with the
// floating-point pipelines of the logarithm and exponential cores (the "path
// balancing" registers of the datapaths). N = 0 is a plain wire. No reset: the
// chain carries data only; the cores' valid bits travel in their own reset chains.
module pipe_delay #(
  parameter int W = 32,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [N];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int i = 1; i < N; i++) stage[i] <= stage[i-1];
    end
    assign q = stage[N-1];
  end

endmodule
