// idea_delay: fixed delay line of N clocks for a W-bit word.
//
// The stage latches that keep the IDEA round's sub-blocks aligned with the
// 7-cycle multipliers. On the FPGA these map to shift-register LUTs; here
// they are a plain register chain; with RESET = 1 (used for the valid and
// round tags) the chain clears on rst_n, otherwise it has no reset.
// Ports: d -> q, q(t) = d(t-N).
module idea_delay #(
  parameter int W = 16,
  parameter int N = 7,
  parameter bit RESET = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] sr [N];

  if (RESET) begin : g_rst
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
      end
    end
  end else begin : g_plain
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
    end
  end

  assign q = sr[N-1];

endmodule
