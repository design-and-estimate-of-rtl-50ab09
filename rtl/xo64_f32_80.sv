// xo64_f32_80 -- controlled substitution-permutation network F_32/80.
//
// Five active layers of 16 controlled elements S_2/1 (xo64_ce) act on a 32-bit
// word. Element j of a layer takes bits 2j and 2j+1; layer l (l = 1..5) is
// controlled by the 16-bit component v_l of the 80-bit control vector, bit j of
// v_l driving element j. Between the layers sit fixed permutations that
// interleave the outputs over groups of 32, 16, 8 and 4 bits: inside a group the
// first outputs of all elements go, in order, to the left half of the group and
// the second outputs to the right half. After five layers every output bit
// depends on every input bit and on control bits of all five layers.
// The layer count, the element and the 80-bit control follow the cipher; the
// exact wiring between the layers is this design's reading of the drawn network.
//
// Ports: din = data in, v = control vector (v[16*(l-1)+j] is bit j of v_l),
// dout = data out. Purely combinational, five element delays deep.
module xo64_f32_80
  import xo64_pkg::*;
(
  input  word_t din,
  input  ctrl_t v,
  output word_t dout
);
  word_t stage [6];   // stage[l] enters layer l+1
  word_t lout  [5];   // output of layer l+1

  assign stage[0] = din;

  for (genvar l = 0; l < 5; l++) begin : g_layer
    for (genvar j = 0; j < 16; j++) begin : g_ce
      xo64_ce u_ce (
        .x (stage[l][2*j +: 2]),
        .v (v[16*l + j]),
        .y (lout[l][2*j +: 2])
      );
    end
    if (l < 4) begin : g_pi
      for (genvar p = 0; p < 32; p++) begin : g_bit
        assign stage[l+1][unshuffle(p, pi_group(l))] = lout[l][p];
      end
    end
  end

  assign dout = lout[4];
endmodule
