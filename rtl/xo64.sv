// xo64 -- iterative XO-64 block cipher core (one round per clock).
//
// XO-64 encrypts a 64-bit block (L, R) under a 128-bit key in eight rounds:
//   for j = 1..7:  (L, R) = Crypt(L, R, K_j, K'_j);  (L, R) = (R, L)
//   (L, R) = Crypt(L, R, K_8, K'_8)
//   (L, R) = (L ^ K_9, R ^ K'_9)                       final transformation
// Decryption is the same procedure with the decryption key order of
// xo64_key_sched, so one datapath serves both directions and the key can be
// changed with every block at no cost.
//
// The core is rolled: one xo64_round instance and a 64-bit state register. A
// block accepted at a clock edge is loaded into the register; the next eight
// edges each apply one round (with the half swap after rounds 1..7), and the
// eighth edge also applies the final transformation and writes the result to
// out_data. The latency from the accepting edge to out_valid is therefore 8
// cycles, and because a new block is accepted in the cycle of the last round,
// back-to-back blocks complete every 8 cycles: 8 rounds of 64 bits at 86 MHz give
// 688 Mbit/s. The rolled one-round-per-clock architecture follows the cipher's
// hardware figures; the handshake, reset and register placement are this
// design's choices.
//
// ROUNDS (default 8, the cipher's round count) may be lowered to 1..7 to obtain
// the reduced-round variants used to study the cipher's diffusion: rounds
// 1..ROUNDS-1 are followed by the swap, round ROUNDS by the final
// transformation with K_9/K'_9, and latency and block period become ROUNDS
// cycles. The decryption key order is defined for eight rounds only, so with
// ROUNDS < 8 only encryption is meaningful.
//
// Interface:
//   in_valid/in_ready  a block (in_data, in_key, in_dec) is taken when both are 1;
//                      in_data = {L, R}, in_key = {K1, K2, K3, K4}, in_dec = 1 decrypts.
//                      Key and direction are captured with the block.
//   out_valid          one-cycle pulse when out_data holds a new result; out_data
//                      stays until the next result. There is no back-pressure.
//   rst_n              synchronous, active low; clears the control state only.
module xo64
  import xo64_pkg::*;
#(
  parameter int unsigned ROUNDS = NUM_ROUNDS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_dec,
  input  logic [127:0] in_key,
  input  logic [63:0]  in_data,
  output logic         out_valid,
  output logic [63:0]  out_data
);
  logic         busy;
  logic [3:0]   rnd;        // round applied at the next edge, 1..ROUNDS
  word_t        l_q, r_q;
  logic [127:0] key_q;
  logic         dec_q;

  word_t k_rnd, kp_rnd, k_ft, kp_ft, l_new, r_new;
  logic  last, accept;

  xo64_key_sched u_ks_round (.key(key_q), .dec(dec_q), .j(rnd),  .k(k_rnd), .kp(kp_rnd));
  xo64_key_sched u_ks_final (.key(key_q), .dec(dec_q), .j(4'd9), .k(k_ft),  .kp(kp_ft));

  xo64_round u_round (
    .l_in (l_q), .r_in (r_q), .k (k_rnd), .kp (kp_rnd),
    .l_out(l_new), .r_out(r_new)
  );

  assign last     = busy && (rnd == 4'(ROUNDS));
  assign in_ready = !busy || last;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rnd       <= 4'd1;
      out_valid <= 1'b0;
      out_data  <= '0;
      l_q       <= '0;
      r_q       <= '0;
      key_q     <= '0;
      dec_q     <= 1'b0;
    end else begin
      out_valid <= last;
      if (last)
        out_data <= {l_new ^ k_ft, r_new ^ kp_ft};

      if (accept) begin
        busy  <= 1'b1;
        rnd   <= 4'd1;
        l_q   <= in_data[63:32];
        r_q   <= in_data[31:0];
        key_q <= in_key;
        dec_q <= in_dec;
      end else if (busy) begin
        if (last) begin
          busy <= 1'b0;
        end else begin
          rnd <= rnd + 4'd1;
          l_q <= r_new;        // swap the halves after rounds 1..7
          r_q <= l_new;
        end
      end
    end
  end

  // ROUNDS must lie in 1..8, the rounds the key schedule defines.
  if (ROUNDS < 1 || ROUNDS > NUM_ROUNDS) begin : g_bad_rounds
    $error("xo64: ROUNDS must be 1..%0d", NUM_ROUNDS);
  end

  // The round counter stays within the configured rounds.
  always_ff @(posedge clk)
    if (rst_n && busy)
      assert (rnd >= 4'd1 && rnd <= 4'(ROUNDS))
        else $error("xo64: round counter %0d out of range", rnd);
endmodule
