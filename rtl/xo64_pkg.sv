// xo64_pkg -- constants shared by the XO-64 block cipher modules.
//
// XO-64 is a 64-bit block cipher with a 128-bit key and eight rounds. It mixes a
// fixed substitution-permutation network (the S_i box) with controlled
// substitution-permutation networks (the F_32/80 boxes) whose 80 control bits are
// taken from the data itself.
//
// This package holds:
//   * the eight 4x4 S-boxes S_0..S_7 (row 0 of DES S-boxes S1..S8),
//   * the fixed permutations P1, P2, P3 of the S_i box as source tables,
//   * the bit selection of the extension box E,
//   * the key schedule of encryption and decryption.
// Bit numbering throughout: position p (1..32) of the published permutation
// cycles is bit p-1 of a 32-bit word; bit 0 is the least significant bit.
// Taking the S-boxes from row 0 of the DES boxes is this design's choice; the
// cipher only says one 4x4 box is taken from each DES box.
package xo64_pkg;

  typedef logic [31:0] word_t;
  typedef logic [79:0] ctrl_t;   // F_32/80 control vector, v[16*l+k] = bit k of v_(l+1)

  localparam int unsigned NUM_ROUNDS = 8;

  // S_k = row 0 of DES S-box k+1, indexed [k][input nibble].
  localparam logic [3:0] SBOX [8][16] = '{
    '{4'd14, 4'd4,  4'd13, 4'd1,  4'd2,  4'd15, 4'd11, 4'd8,  4'd3,  4'd10, 4'd6,  4'd12, 4'd5,  4'd9,  4'd0,  4'd7 },
    '{4'd15, 4'd1,  4'd8,  4'd14, 4'd6,  4'd11, 4'd3,  4'd4,  4'd9,  4'd7,  4'd2,  4'd13, 4'd12, 4'd0,  4'd5,  4'd10},
    '{4'd10, 4'd0,  4'd9,  4'd14, 4'd6,  4'd3,  4'd15, 4'd5,  4'd1,  4'd13, 4'd12, 4'd7,  4'd11, 4'd4,  4'd2,  4'd8 },
    '{4'd7,  4'd13, 4'd14, 4'd3,  4'd0,  4'd6,  4'd9,  4'd10, 4'd1,  4'd2,  4'd8,  4'd5,  4'd11, 4'd12, 4'd4,  4'd15},
    '{4'd2,  4'd12, 4'd4,  4'd1,  4'd7,  4'd10, 4'd11, 4'd6,  4'd8,  4'd5,  4'd3,  4'd15, 4'd13, 4'd0,  4'd14, 4'd9 },
    '{4'd12, 4'd1,  4'd10, 4'd15, 4'd9,  4'd2,  4'd6,  4'd8,  4'd0,  4'd13, 4'd3,  4'd4,  4'd14, 4'd7,  4'd5,  4'd11},
    '{4'd4,  4'd11, 4'd2,  4'd14, 4'd15, 4'd0,  4'd8,  4'd13, 4'd3,  4'd12, 4'd9,  4'd7,  4'd5,  4'd10, 4'd6,  4'd1 },
    '{4'd13, 4'd2,  4'd8,  4'd4,  4'd6,  4'd15, 4'd11, 4'd1,  4'd10, 4'd9,  4'd3,  4'd14, 4'd5,  4'd0,  4'd12, 4'd7 }
  };

  // Fixed permutations of the S_i box, written as "output bit i takes input bit
  // SRC[i]". They follow the cycle notation of the cipher, read so that a cycle
  // (a1 a2 .. ak) gives out[a1]=in[a2], out[a2]=in[a3], .., out[ak]=in[a1]:
  //   P1 = (1,3,19,17)(2,7,20,21)(4,23,18,5)(6,8,24,22)
  //        (11,27,25,9)(10,15,28,29)(12,31,26,13)(14,16,32,30)
  //   P2 = (2,5)(3,9)(4,13)(7,10)(8,14)(12,15)(18,21)(19,25)(20,29)(23,26)(24,30)(28,31)
  //   P3 = (2,5)(3,17)(4,21)(7,18)(8,22)(10,13)(11,25)(12,29)(15,26)(16,30)(20,23)(28,31)
  // P2 and P3 are involutions; P2 keeps each 16-bit half in place, P3 crosses them.
  localparam int unsigned P1_SRC [32] = '{
     2,  6, 18, 22,  3,  7, 19, 23, 10, 14, 26, 30, 11, 15, 27, 31,
     0,  4, 16, 20,  1,  5, 17, 21,  8, 12, 24, 28,  9, 13, 25, 29};
  localparam int unsigned P2_SRC [32] = '{
     0,  4,  8, 12,  1,  5,  9, 13,  2,  6, 10, 14,  3,  7, 11, 15,
    16, 20, 24, 28, 17, 21, 25, 29, 18, 22, 26, 30, 19, 23, 27, 31};
  localparam int unsigned P3_SRC [32] = '{
     0,  4, 16, 20,  1,  5, 17, 21,  8, 12, 24, 28,  9, 13, 25, 29,
     2,  6, 18, 22,  3,  7, 19, 23, 10, 14, 26, 30, 11, 15, 27, 31};

  // First bit of X taken by each 16-bit control component of E:
  //   v1 = x0..x15, v2 = x16..x31, v3 = x5..x20, v4 = x21..x31,x0..x4, v5 = x10..x25
  // Bit k of v_l is x[(E_START[l] + k) mod 32].
  localparam int unsigned E_START [5] = '{0, 16, 5, 21, 10};

  // Key schedule: index (1..4) of K_j and K'_j for rounds j = 1..8 and the final
  // transformation j = 9. Entry [j-1] = {index of K_j, index of K'_j}.
  localparam int unsigned KS_ENC [9][2] = '{
    '{1,2}, '{3,4}, '{3,1}, '{4,1}, '{2,3}, '{3,4}, '{1,2}, '{4,3}, '{1,3}};
  localparam int unsigned KS_DEC [9][2] = '{
    '{1,3}, '{3,4}, '{2,1}, '{4,3}, '{3,2}, '{1,4}, '{1,3}, '{4,3}, '{1,2}};

  // Inverse perfect shuffle used between the layers of F_32/80: inside a group of
  // g bits, position p goes to p/2 when p is even and to g/2 + (p-1)/2 when odd,
  // so the first outputs of all elements of the group fill its left half and the
  // second outputs its right half.
  function automatic int unsigned unshuffle(int unsigned p, int unsigned g);
    int unsigned base, q;
    base = p - (p % g);
    q    = p % g;
    return base + ((q % 2 == 0) ? q / 2 : g / 2 + q / 2);
  endfunction

  // Group size of the fixed permutation after layer l (l = 0..3) of F_32/80.
  function automatic int unsigned pi_group(int unsigned l);
    return 32 >> l;
  endfunction

endpackage
