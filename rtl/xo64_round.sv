// xo64_round -- one round Crypt of XO-64.
//
// With round keys K and K':
//   A  = S_i(L ^ K)                  left branch, fixed involution
//   B  = F_32/80(R ^ K', V = E(A))   right branch, controlled by the left one
//   L' = S_i(B)                      after the crossing, B continues on the left
//   R' = F^-1_32/80(A, V' = E(B))    and A on the right
// The round is invertible: given (L', R') one recovers B = S_i(L'),
// A = F_32/80(R', E(B)), R ^ K' = F^-1_32/80(B, E(A)), L ^ K = S_i(A).
// Running the same round with the keys in the decryption order therefore
// decrypts; the same datapath serves both directions and only the key
// schedule changes. The round structure follows the cipher.
//
// Ports: l_in, r_in = data halves, k = K_j, kp = K'_j, l_out, r_out = results.
// Purely combinational: two S_i boxes and two controlled networks in series.
module xo64_round
  import xo64_pkg::*;
(
  input  word_t l_in,
  input  word_t r_in,
  input  word_t k,
  input  word_t kp,
  output word_t l_out,
  output word_t r_out
);
  word_t a, b;
  ctrl_t v_a, v_b;

  xo64_si         u_si_a (.din(l_in ^ k), .dout(a));
  xo64_ext_e      u_e_a  (.x(a), .v(v_a));
  xo64_f32_80     u_f    (.din(r_in ^ kp), .v(v_a), .dout(b));
  xo64_ext_e      u_e_b  (.x(b), .v(v_b));
  xo64_si         u_si_b (.din(b), .dout(l_out));
  xo64_f32_80_inv u_finv (.din(a), .v(v_b), .dout(r_out));
endmodule
