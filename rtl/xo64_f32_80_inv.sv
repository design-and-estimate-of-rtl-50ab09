// xo64_f32_80_inv -- inverse controlled network F^-1_32/80.
//
// For the same 80-bit control vector this box undoes xo64_f32_80. It is the
// mirror image of that box: the layers are passed in the order v_5, v_4, .., v_1
// and each fixed permutation is replaced by its inverse (a perfect shuffle over
// groups of 4, 8, 16 and 32 bits). Since every controlled element substitution is
// an involution, a layer with the same control bits is its own inverse, so no
// other cell is needed. That the inverse box is the reverse of the direct one
// follows the cipher; its wiring mirrors this design's reading of F_32/80.
//
// Ports: din = data in, v = control vector V' (same layout as in xo64_f32_80),
// dout = data out. Purely combinational, five element delays deep.
module xo64_f32_80_inv
  import xo64_pkg::*;
(
  input  word_t din,
  input  ctrl_t v,
  output word_t dout
);
  word_t stage [6];   // stage[s] enters step s (layer 5-s)
  word_t lout  [5];

  assign stage[0] = din;

  for (genvar s = 0; s < 5; s++) begin : g_step
    localparam int unsigned L = 4 - s;   // 0-based layer index
    for (genvar j = 0; j < 16; j++) begin : g_ce
      xo64_ce u_ce (
        .x (stage[s][2*j +: 2]),
        .v (v[16*L + j]),
        .y (lout[s][2*j +: 2])
      );
    end
    if (s < 4) begin : g_pi_inv
      for (genvar p = 0; p < 32; p++) begin : g_bit
        assign stage[s+1][p] = lout[s][unshuffle(p, pi_group(L - 1))];
      end
    end
  end

  assign dout = lout[4];
endmodule
