// xo64_f32_80_inv_tb -- test of the inverse controlled network F^-1_32/80.
//
// Known answers from a separate software model of the cipher, then 1000 random
// (x, V) pairs: F_32/80(F^-1_32/80(x, V), V) must give x back.
module xo64_f32_80_inv_tb;
  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;

  // x, V, F^-1(x,V)
  localparam logic [143:0] KAT [4] = '{
    {32'h73cf256d, 80'hc7fdec99db5b8f4ddda1, 32'h6256eb01},
    {32'h7734d7c1, 80'h309d965edae4820173ab, 32'h4dc170f1},
    {32'h2f45e678, 80'h9d2ca13f79cb830ccdcc, 32'h2019da1e},
    {32'hcb008853, 80'h244c4dab725318182fa9, 32'h8cacc1e7}};

  logic [31:0] x, y, z;
  logic [79:0] v;

  xo64_f32_80_inv dut   (.din(x), .v(v), .dout(y));
  xo64_f32_80     u_fwd (.din(y), .v(v), .dout(z));

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
      {x, v} = KAT[i][143:32];
      @(posedge clk);
      checks++;
      if (y !== KAT[i][31:0]) begin
        failures++;
        $display("FAIL F^-1(%h, %h)=%h expected %h", x, v, y, KAT[i][31:0]);
      end
    end
    for (int i = 0; i < 1000; i++) begin
      x = $urandom;
      v = {$urandom, $urandom, $urandom};
      @(posedge clk);
      checks++;
      if (z !== x) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h V=%h got %h", x, v, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
