// xo64_key_sched -- round key selection of XO-64.
//
// XO-64 does no key preprocessing: the 128-bit key K = (K1, K2, K3, K4) is split
// into four 32-bit words and each round j = 1..8, and the final transformation
// j = 9, uses a fixed pair (K_j, K'_j) of them. Encryption and decryption use
// different pairs:
//   j      1     2     3     4     5     6     7     8     9
//   enc  K1/K2 K3/K4 K3/K1 K4/K1 K2/K3 K3/K4 K1/K2 K4/K3 K1/K3
//   dec  K1/K3 K3/K4 K2/K1 K4/K3 K3/K2 K1/K4 K1/K3 K4/K3 K1/K2
// The pairs follow the cipher. K1 being the most significant word of the key
// port, and j outside 1..9 giving the j = 1 pair, are this design's choices.
//
// Ports: key, dec (0 encrypt, 1 decrypt), j = round number, k = K_j, kp = K'_j.
// Purely combinational: two 4-way word multiplexers.
module xo64_key_sched
  import xo64_pkg::*;
(
  input  logic [127:0] key,
  input  logic         dec,
  input  logic [3:0]   j,
  output word_t        k,
  output word_t        kp
);
  int unsigned idx_k, idx_kp;
  logic [3:0]  row;

  function automatic word_t key_word(logic [127:0] kk, int unsigned n);
    // K1 = kk[127:96], .., K4 = kk[31:0]
    return kk[32*(4 - n) +: 32];
  endfunction

  always_comb begin
    row = (j >= 4'd1 && j <= 4'd9) ? j - 4'd1 : 4'd0;
    if (dec) begin
      idx_k  = KS_DEC[row][0];
      idx_kp = KS_DEC[row][1];
    end else begin
      idx_k  = KS_ENC[row][0];
      idx_kp = KS_ENC[row][1];
    end
    k  = key_word(key, idx_k);
    kp = key_word(key, idx_kp);
  end
endmodule
