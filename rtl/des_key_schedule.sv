// des_key_schedule: the DES key schedule, as combinational logic.
//
// The accelerator takes the 64-bit raw key (parity bits included) in its key
// register rather than a precomputed schedule, which keeps the host transfer
// to one word per key; this block expands it into the sixteen 48-bit round
// subkeys. PC-1 drops the parity bits and splits the key into two 28-bit
// halves C and D; before round i both halves rotate left by one or two
// places, and PC-2 selects 48 bits of C||D as K_i. The rotations are fixed
// wiring, so the whole schedule is permutation only: no gates.
//
// Ports: key (raw 64-bit key) -> ks (ks[0] = K1 ... ks[15] = K16).
// Timing: purely combinational.
module des_key_schedule
  import des_pkg::*;
(
  input  block_t key,
  output ks_t    ks
);

  always_comb begin
    logic [27:0] c, d;
    logic [55:0] cd;
    cd = pc1(key);
    c  = cd[55:28];
    d  = cd[27:0];
    for (int i = 0; i < 16; i++) begin
      if (SHIFT_T[i] == 1) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end else begin
        c = {c[25:0], c[27:26]};
        d = {d[25:0], d[27:26]};
      end
      ks[i] = pc2({c, d});
    end
  end

endmodule
