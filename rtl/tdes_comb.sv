// tdes_comb: the Triple-DES core, three combinational DES cores in cascade.
//
// Encryption is E(K3, D(K2, E(K1, x))): the first and last cores encrypt
// and the middle one decrypts. For decryption every core flips its mode and
// the keys are applied in the opposite order, D(K1, E(K2, D(K3, y))). With
// K1 = K2 the cascade reduces to single DES under K3, which keeps it
// compatible with plain DES. Like des_comb it has no registers: the CBC
// controller waits a fixed number of cycles for it to settle.
//
// Ports: din, key1..key3 (raw 64-bit keys), decrypt -> dout.
// Timing: combinational, three DES cores deep.
module tdes_comb
  import des_pkg::*;
(
  input  block_t din,
  input  block_t key1,
  input  block_t key2,
  input  block_t key3,
  input  logic   decrypt,
  output block_t dout
);

  block_t s1, s2;
  block_t ka, kc;

  // the outer cores swap keys when decrypting
  assign ka = decrypt ? key3 : key1;
  assign kc = decrypt ? key1 : key3;

  des_comb u_des1 (.din(din), .key(ka),   .decrypt(decrypt),  .dout(s1));
  des_comb u_des2 (.din(s1),  .key(key2), .decrypt(!decrypt), .dout(s2));
  des_comb u_des3 (.din(s2),  .key(kc),   .decrypt(decrypt),  .dout(dout));

endmodule
