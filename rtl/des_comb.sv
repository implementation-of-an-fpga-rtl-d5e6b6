// des_comb: a DES core made of sixteen combinational rounds.
//
// The CBC accelerators use a DES core with no registers inside: IP, sixteen
// des_round instances in a chain, the final half swap and IP^-1. Of the
// round counts compared for this core (1, 2, 4, 8 or 16 rounds per clock)
// all gave similar throughput, and sixteen was chosen because the control
// around it is simplest: the controller loads an input register, waits a
// fixed number of (slow) clock cycles for the chain to settle and samples
// the result. Decryption is the same chain with the subkeys in reverse
// order, K16 first.
//
// Ports: din (64-bit block), key (raw 64-bit key), decrypt -> dout.
// Timing: combinational from din/key/decrypt to dout; the surrounding
// controller treats it as a multicycle path.
module des_comb
  import des_pkg::*;
(
  input  block_t din,
  input  block_t key,
  input  logic   decrypt,
  output block_t dout
);

  ks_t         ks;
  logic [31:0] l [17];
  logic [31:0] r [17];
  block_t      pre;

  des_key_schedule u_ks (.key(key), .ks(ks));

  assign pre  = ip(din);
  assign l[0] = pre[63:32];
  assign r[0] = pre[31:0];

  for (genvar i = 0; i < 16; i++) begin : g_round
    subkey_t k;
    assign k = decrypt ? ks[15 - i] : ks[i];
    des_round u_round (
      .l_in(l[i]), .r_in(r[i]), .k(k), .l_out(l[i+1]), .r_out(r[i+1]));
  end

  // the last round does not swap: R16 L16 goes into IP^-1
  assign dout = fp({r[16], l[16]});

endmodule
