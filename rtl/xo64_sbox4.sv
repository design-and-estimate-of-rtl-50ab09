// xo64_sbox4 -- one 4x4 S-box of XO-64, direct or inverse.
//
// IDX selects S_IDX (row 0 of DES S-box IDX+1, see xo64_pkg); INV = 1 gives
// the inverse box S_IDX^-1, found by searching the table for the entry equal to
// the input, which synthesizes to a 4-input look-up like the direct box.
// Bit 0 of a nibble is the least significant bit of the table index and value.
//
// Ports: din = input nibble, dout = output nibble. Purely combinational.
module xo64_sbox4
  import xo64_pkg::*;
#(
  parameter int unsigned IDX = 0,
  parameter bit          INV = 1'b0
) (
  input  logic [3:0] din,
  output logic [3:0] dout
);
  always_comb begin
    dout = '0;
    if (INV) begin
      for (int unsigned i = 0; i < 16; i++)
        if (SBOX[IDX][i] == din) dout = 4'(i);
    end else begin
      dout = SBOX[IDX][din];
    end
  end
endmodule
