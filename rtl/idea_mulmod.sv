// idea_mulmod: pipelined multiplication modulo 2^16+1.
//
// Computes x*y mod 2^16+1, with 0 standing for 2^16, the costliest IDEA
// operation. It uses modulo-2^16 arithmetic only: with xd = x-1 and
// yd = y-1 the full product is t = xd*yd + xd + yd + 1 (taken modulo 2^32,
// which turns the single overflow case 2^16*2^16 into 0), and with tl, th
// its low and high halves the result is tl - th, plus one when tl <= th.
// The second operand is always a subkey, so it arrives already decremented
// (yd) from the key ROM and the subtraction for it is saved.
//
// Stages: 1 input decrement, 2-5 the 16x16 multiplier (four stages, the
// latency of the vendor multiplier the design was built with), 6 the sum t,
// 7 the final correction.
// Ports: x, yd -> z. Timing: z is valid 7 clocks after x/yd; a new operand
// pair every clock; no reset needed (pure datapath).
module idea_mulmod
  import idea_pkg::*;
(
  input  logic    clk,
  input  word16_t x,
  input  word16_t yd,
  output word16_t z
);

  localparam int MUL_STAGES = 4;

  word16_t     xd_q, yd_q;
  logic [31:0] prod_q [MUL_STAGES];
  logic [16:0] side_q [MUL_STAGES];   // xd + yd + 1, carried alongside
  word16_t     tl_q, th_q;

  always_ff @(posedge clk) begin
    // stage 1
    xd_q <= x - 16'd1;
    yd_q <= yd;
    // stages 2..5
    prod_q[0] <= 32'(xd_q) * 32'(yd_q);
    side_q[0] <= 17'(xd_q) + 17'(yd_q) + 17'd1;
    for (int i = 1; i < MUL_STAGES; i++) begin
      prod_q[i] <= prod_q[i-1];
      side_q[i] <= side_q[i-1];
    end
    // stage 6: t = (xd+1)(yd+1) modulo 2^32
    {th_q, tl_q} <= prod_q[MUL_STAGES-1] + 32'(side_q[MUL_STAGES-1]);
    // stage 7
    z <= tl_q - th_q + word16_t'(tl_q <= th_q);
  end

endmodule
