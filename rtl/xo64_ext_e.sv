// xo64_ext_e -- extension box E of XO-64.
//
// Expands a 32-bit word X into the 80-bit control vector V = (v1, .., v5) of an
// F_32/80 box. Each 16-bit component is a run of 16 consecutive bits of X,
// wrapping from x31 to x0:
//   v1 = x0..x15, v2 = x16..x31, v3 = x5..x20, v4 = x21..x31,x0..x4, v5 = x10..x25
// so every bit of X controls two or three elements. The selection follows the
// cipher; placing element j of each run in bit j of v_l is this design's choice.
//
// Ports: x = X, v = V with v[16*(l-1)+k] = bit k of v_l. Wiring only, no gates.
module xo64_ext_e
  import xo64_pkg::*;
(
  input  word_t x,
  output ctrl_t v
);
  for (genvar l = 0; l < 5; l++) begin : g_comp
    for (genvar k = 0; k < 16; k++) begin : g_bit
      assign v[16*l + k] = x[(E_START[l] + k) % 32];
    end
  end
endmodule
