// xo64_si -- S_i box of XO-64: a 32-bit involutive substitution-permutation network.
//
// The word passes, in order:
//   1. S_0..S_7 on its eight nibbles (nibble k = bits 4k..4k+3 gets S_k),
//   2. the fixed permutation P1,
//   3. S_0..S_3 on the left half (bits 0..15) and S_4^-1..S_7^-1 on the right half,
//   4. P2, which permutes each half in place (I1 and I2),
//   5. S_4..S_7 on the left half and S_0^-1..S_3^-1 on the right half,
//   6. P3, an involution that also exchanges bits between the halves (I3 and the crossing),
//   7. S_0^-1..S_7^-1.
// The right-hand path of steps 3-5 is the inverse of the left-hand path and P1 is
// P3 followed by a half swap, which makes the whole box its own inverse:
// S_i(S_i(x)) = x. The structure, the S-box groups and the permutation cycles
// follow the cipher; the bit numbering, the direction in which the cycles are
// read and the placement of S-boxes on nibbles are this design's choices (the
// cycle reading is the one that makes the box an involution).
//
// Ports: din, dout (32 bits). Purely combinational, four S-box levels deep.
module xo64_si
  import xo64_pkg::*;
(
  input  word_t din,
  output word_t dout
);
  word_t s1_out, p1_out, s2_out, p2_out, s3_out, p3_out;

  for (genvar k = 0; k < 8; k++) begin : g_nib
    // step 1: S_k
    xo64_sbox4 #(.IDX(k), .INV(1'b0)) u_s1 (.din(din[4*k +: 4]), .dout(s1_out[4*k +: 4]));
    // step 3: left S_0..3, right S_4..7 inverse
    xo64_sbox4 #(.IDX(k), .INV(k >= 4)) u_s2 (.din(p1_out[4*k +: 4]), .dout(s2_out[4*k +: 4]));
    // step 5: left S_4..7, right S_0..3 inverse
    xo64_sbox4 #(.IDX((k + 4) % 8), .INV(k >= 4)) u_s3 (.din(p2_out[4*k +: 4]), .dout(s3_out[4*k +: 4]));
    // step 7: S_k inverse
    xo64_sbox4 #(.IDX(k), .INV(1'b1)) u_s4 (.din(p3_out[4*k +: 4]), .dout(dout[4*k +: 4]));
  end

  for (genvar i = 0; i < 32; i++) begin : g_perm
    assign p1_out[i] = s1_out[P1_SRC[i]];
    assign p2_out[i] = s2_out[P2_SRC[i]];
    assign p3_out[i] = s3_out[P3_SRC[i]];
  end
endmodule
