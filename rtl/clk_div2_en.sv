// clk_div2_en: divide-by-two of the interface clock, as a clock enable.
//
// The host interface runs at 100 MHz while the cipher logic and its
// controller run at 50 MHz. Rather than deriving a second clock, this block
// toggles a flip-flop every cycle and the half-rate logic advances only on
// cycles where ce is high, which gives the same rate on a single clock.
//
// Ports: clk, rst_n -> ce (high on every second cycle, first high on the
// first cycle after reset is released).
module clk_div2_en (
  input  logic clk,
  input  logic rst_n,
  output logic ce
);

  logic phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 1'b0;
    else        phase <= !phase;
  end

  assign ce = !phase;

endmodule
