// idea_core: bit-parallel IDEA core with one round pipeline used nine times.
//
// A full IDEA round needs four modular multipliers; building all eight rounds
// did not fit, so one round is built and the data loop through it. The round
// is three multipliers deep (7 cycles each), 21 cycles in all, so 21 blocks
// are in flight at once:
//   stage A (cycles 0-7):  X1*Z1, X2+Z2, X3+Z3, X4*Z4  -> A1..A4
//                          (the adds are followed by 7-cycle delays)
//   stage B (cycles 7-14): (A1^A3)*Z5 -> P; A2^A4 delayed 7
//   stage C (cycles 14-21): (P + (A2^A4))*Z6 -> Q; R = P(delayed 7) + Q;
//                          out = A1^Q, A3^Q, A2^R, A4^R (A delayed 14)
// The output of stage C returns to the input mux ("feedback control"). A
// batch of up to 21 blocks is taken on 21 consecutive cycles, then circulates
// for 8 rounds; on its ninth pass the output transformation is stage A alone,
// so the result is taken at the half-round tap after 7 cycles. Each word
// carries a valid bit and its round number, which selects its subkeys in
// idea_key_rom at every multiplier and adder. The output transformation
// undoes the swap of the middle sub-blocks that every round makes: on that
// pass the lane-2 adder gets Z3 and the lane-3 adder Z2, and lanes 2 and 3
// are exchanged at the output.
//
// Ports: in_valid/din/in_ready (a block is taken when both are high),
// decrypt (selects the schedule; sampled when a batch starts),
// out_valid/dout. Blocks leave in the order they entered.
// Timing: latency 21*8 + 7 = 175 cycles; a batch of 21 blocks every
// 21*9 = 189 cycles, i.e. 21*64/189 bits per clock.
module idea_core
  import idea_pkg::*;
#(
  parameter logic [127:0] KEY = 128'h0001_0002_0003_0004_0005_0006_0007_0008
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] din,
  input  logic        decrypt,
  output logic        in_ready,
  output logic        out_valid,
  output logic [63:0] dout
);

  localparam int BATCH  = RND_LAT;             // blocks per batch
  localparam int PERIOD = RND_LAT * (ROUNDS + 1);

  typedef struct packed {
    logic       v;
    logic [3:0] rnd;
  } tag_t;

  // ---- batch control ----
  logic        active, dec_q;
  logic [7:0]  cnt;          // cycle within the batch period
  logic        load;

  assign load     = !active || int'(cnt) < BATCH;
  assign in_ready = load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      dec_q  <= 1'b0;
    end else if (!active) begin
      if (in_valid) begin
        active <= 1'b1;
        cnt    <= 8'd1;
        dec_q  <= decrypt;
      end
    end else if (int'(cnt) == PERIOD - 1) begin
      active <= 1'b0;
      cnt    <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  // ---- input mux: new block or feedback ----
  word16_t x [4];
  word16_t fb [4];
  tag_t    fb_tag, x_tag;
  logic    dec_now;

  assign dec_now = active ? dec_q : decrypt;

  always_comb begin
    if (load) begin
      x_tag.v   = in_valid;
      x_tag.rnd = '0;
      for (int i = 0; i < 4; i++) x[i] = din[63 - 16*i -: 16];
    end else begin
      x_tag.v   = fb_tag.v && int'(fb_tag.rnd) < ROUNDS;
      x_tag.rnd = fb_tag.rnd + 1'b1;
      for (int i = 0; i < 4; i++) x[i] = fb[i];
    end
  end

  // ---- stage A ----
  rkeys_t  za, zb, zc;
  tag_t    tag_a, tag_b, tag_c;
  word16_t a [4];
  word16_t add2, add3;
  logic    otf_in;      // this word is on its output-transformation pass

  assign otf_in = int'(x_tag.rnd) == ROUNDS;

  idea_key_rom #(.KEY(KEY)) u_rom_a (.dec(dec_now), .round(x_tag.rnd), .z(za));

  assign add2 = x[1] + (otf_in ? za[2] : za[1]);
  assign add3 = x[2] + (otf_in ? za[1] : za[2]);

  idea_mulmod u_mul1 (.clk(clk), .x(x[0]), .yd(za[0]), .z(a[0]));
  idea_delay #(.W(16), .N(MUL_LAT)) u_d2 (.clk(clk), .rst_n(rst_n), .d(add2), .q(a[1]));
  idea_delay #(.W(16), .N(MUL_LAT)) u_d3 (.clk(clk), .rst_n(rst_n), .d(add3), .q(a[2]));
  idea_mulmod u_mul4 (.clk(clk), .x(x[3]), .yd(za[3]), .z(a[3]));
  idea_delay #(.W(5),  .N(MUL_LAT), .RESET(1'b1)) u_dta (.clk(clk), .rst_n(rst_n), .d(x_tag), .q(tag_a));

  // half-round tap: the output transformation result
  assign out_valid = tag_a.v && int'(tag_a.rnd) == ROUNDS;
  assign dout      = {a[0], a[2], a[1], a[3]};

  // ---- stage B ----
  word16_t p, t1_d, a_d [4];

  idea_key_rom #(.KEY(KEY)) u_rom_b (.dec(dec_q), .round(tag_a.rnd), .z(zb));

  idea_mulmod u_mul5 (.clk(clk), .x(a[0] ^ a[2]), .yd(zb[4]), .z(p));
  idea_delay #(.W(16), .N(MUL_LAT)) u_dt1 (.clk(clk), .rst_n(rst_n), .d(a[1] ^ a[3]), .q(t1_d));
  idea_delay #(.W(5),  .N(MUL_LAT), .RESET(1'b1)) u_dtb (.clk(clk), .rst_n(rst_n), .d(tag_a), .q(tag_b));
  for (genvar i = 0; i < 4; i++) begin : g_skip
    idea_delay #(.W(16), .N(2*MUL_LAT)) u_da (.clk(clk), .rst_n(rst_n), .d(a[i]), .q(a_d[i]));
  end

  // ---- stage C ----
  word16_t q, p_d, r;

  idea_key_rom #(.KEY(KEY)) u_rom_c (.dec(dec_q), .round(tag_b.rnd), .z(zc));

  idea_mulmod u_mul6 (.clk(clk), .x(p + t1_d), .yd(zc[5]), .z(q));
  idea_delay #(.W(16), .N(MUL_LAT)) u_dp (.clk(clk), .rst_n(rst_n), .d(p), .q(p_d));
  idea_delay #(.W(5),  .N(MUL_LAT), .RESET(1'b1)) u_dtc (.clk(clk), .rst_n(rst_n), .d(tag_b), .q(tag_c));

  assign r = p_d + q;

  assign fb[0]  = a_d[0] ^ q;
  assign fb[1]  = a_d[2] ^ q;
  assign fb[2]  = a_d[1] ^ r;
  assign fb[3]  = a_d[3] ^ r;
  assign fb_tag = tag_c;

endmodule
