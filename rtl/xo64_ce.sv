// xo64_ce -- controlled element S_2/1, the basic cell of the F_32/80 boxes.
//
// The element maps two data bits (x1, x2) to (y1, y2) with one of two 2x2
// involutions selected by the control bit v:
//   v = 0:  y1 = x1,            y2 = x1 ^ x2
//   v = 1:  y1 = x1 ^ ~x2,      y2 = x2
// Both substitutions are bijective involutions, and y1, y2 and y1 ^ y2 are
// balanced quadratic functions of (x1, x2, v) with the largest non-linearity a
// balanced 3-input function can have. These are the selection criteria for the
// element; the particular pair of substitutions is this design's choice among
// the ones that meet them. Because each substitution is its own inverse, the
// same cell serves in F_32/80 and in its inverse.
//
// Ports: x[0] = x1, x[1] = x2, v = control bit, y[0] = y1, y[1] = y2.
// Purely combinational.
module xo64_ce (
  input  logic [1:0] x,
  input  logic       v,
  output logic [1:0] y
);
  always_comb begin
    if (v) begin
      y[0] = x[0] ^ ~x[1];
      y[1] = x[1];
    end else begin
      y[0] = x[0];
      y[1] = x[0] ^ x[1];
    end
  end
endmodule
