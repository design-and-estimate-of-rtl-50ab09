// xo64_round_tb -- test of the round transformation Crypt.
//
// Known answers from a separate software model, then 500 random rounds checked
// for invertibility. With (L', R') = Crypt(L, R, K, K') the round is undone by
//   B = S_i(L'),  A = F_32/80(R', E(B)),  L ^ K = S_i(A),  R ^ K' = F^-1_32/80(B, E(A))
// computed here with separate instances of S_i, E and the two networks.
module xo64_round_tb;
  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;

  localparam logic [191:0] KAT [4] = '{
    {32'hcf44dd3f, 32'he3eff9c0, 32'hb1852f27, 32'ha26b7f62, 32'hc2d40516, 32'h3aa4a747},
    {32'h0ab8ab67, 32'h986e86cb, 32'hfb710734, 32'h656abd72, 32'ha322fc5f, 32'h5d383427},
    {32'hf6fa5db8, 32'h73f778aa, 32'ha7677796, 32'hbd299753, 32'h7204c331, 32'h5671748d},
    {32'h9d95847e, 32'ha66b0d38, 32'h28518867, 32'h9f8558a6, 32'h307b3d02, 32'h5a48501d}};

  logic [31:0] l, r, k, kp, lo, ro;
  logic [31:0] b, a, lk, rk;
  logic [79:0] vb, va;

  xo64_round dut (.l_in(l), .r_in(r), .k(k), .kp(kp), .l_out(lo), .r_out(ro));

  // inverse path
  xo64_si     u_si_1 (.din(lo), .dout(b));
  xo64_ext_e  u_e    (.x(b), .v(vb));
  xo64_f32_80 u_f    (.din(ro), .v(vb), .dout(a));
  xo64_si     u_si_2 (.din(a), .dout(lk));
  xo64_ext_e  u_e_a  (.x(a), .v(va));
  xo64_f32_80_inv u_fi (.din(b), .v(va), .dout(rk));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {l, r, k, kp} = KAT[i][191:64];
      @(posedge clk);
      checks++;
      if ({lo, ro} !== KAT[i][63:0]) begin
        failures++;
        $display("FAIL Crypt(%h,%h,%h,%h)=%h %h expected %h", l, r, k, kp, lo, ro, KAT[i][63:0]);
      end
    end
    for (int i = 0; i < 500; i++) begin
      l = $urandom; r = $urandom; k = $urandom; kp = $urandom;
      @(posedge clk);
      checks++;
      if (lk !== (l ^ k)) begin
        failures++;
        if (failures < 10) $display("FAIL inverse L: got %h expected %h", lk, l ^ k);
      end
      checks++;
      if (rk !== (r ^ kp)) begin
        failures++;
        if (failures < 10) $display("FAIL inverse R: got %h expected %h", rk, r ^ kp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
