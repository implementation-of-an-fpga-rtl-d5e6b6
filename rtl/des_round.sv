// des_round: one combinational DES round.
//
// Implements L_i = R_{i-1} and R_i = L_{i-1} xor f(R_{i-1}, K_i), with
// f(R, K) = P(S(E(R) xor K)): the right half is expanded from 32 to 48 bits,
// mixed with the round subkey, passed through the eight S-boxes and permuted
// by P. The halves swap on every round; the DES cores undo the swap after
// the sixteenth round.
//
// Ports: l_in, r_in (halves from the previous round), k (round subkey) ->
// l_out, r_out. Timing: combinational; the cores either chain sixteen of
// these or put a register after each.
module des_round
  import des_pkg::*;
(
  input  logic [31:0] l_in,
  input  logic [31:0] r_in,
  input  subkey_t     k,
  output logic [31:0] l_out,
  output logic [31:0] r_out
);

  assign l_out = r_in;
  assign r_out = l_in ^ f_func(r_in, k);

endmodule
