// des_pipe: DES core pipelined into sixteen stages, one per round (ECB mode).
//
// In ECB mode blocks do not depend on each other, so each DES round gets a
// pipeline register after it and a new block can enter every (enabled)
// clock. IP is applied in front of the first round and the final half swap
// and IP^-1 behind the last register, both being wiring only. A valid bit
// and a TAG_W-bit tag (the buffer address of the block) travel with each
// block so the output can be written back to the right place.
//
// Ports: ce (clock enable: the pipeline advances only when it is high),
// flush (synchronous clear of every valid bit, used by the soft reset),
// in_valid/din/in_tag, key (raw key, held constant while blocks are in
// flight), decrypt -> out_valid/dout/out_tag.
// Timing: a block presented with in_valid on an enabled cycle appears on
// the outputs 16 enabled cycles later; throughput one block per enabled
// cycle. Reset clears the valid bits only.
module des_pipe
  import des_pkg::*;
#(
  parameter int TAG_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             flush,
  input  logic             in_valid,
  input  block_t           din,
  input  logic [TAG_W-1:0] in_tag,
  input  block_t           key,
  input  logic             decrypt,
  output logic             out_valid,
  output block_t           dout,
  output logic [TAG_W-1:0] out_tag
);

  ks_t              ks;
  block_t           pre;
  logic [31:0]      l_q   [17];
  logic [31:0]      r_q   [17];
  logic [16:0]      v_q;
  logic [TAG_W-1:0] tag_q [17];

  des_key_schedule u_ks (.key(key), .ks(ks));

  // stage 0 is the (unregistered) pipeline input
  assign pre      = ip(din);
  assign l_q[0]   = pre[63:32];
  assign r_q[0]   = pre[31:0];
  assign v_q[0]   = in_valid;
  assign tag_q[0] = in_tag;

  for (genvar i = 0; i < 16; i++) begin : g_stage
    subkey_t     k;
    logic [31:0] l_n, r_n;
    assign k = decrypt ? ks[15 - i] : ks[i];
    des_round u_round (
      .l_in(l_q[i]), .r_in(r_q[i]), .k(k), .l_out(l_n), .r_out(r_n));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_q[i+1] <= 1'b0;
      end else if (flush) begin
        v_q[i+1] <= 1'b0;
      end else if (ce) begin
        v_q[i+1] <= v_q[i];
      end
    end

    always_ff @(posedge clk) begin
      if (ce) begin
        l_q[i+1]   <= l_n;
        r_q[i+1]   <= r_n;
        tag_q[i+1] <= tag_q[i];
      end
    end
  end

  assign out_valid = v_q[16];
  assign out_tag   = tag_q[16];
  assign dout      = fp({r_q[16], l_q[16]});

endmodule
