// xo64_f32_80_tb -- test of the controlled network F_32/80.
//
// Known answers from a separate software model of the cipher, then 1000 random
// (x, V) pairs: F^-1_32/80(F_32/80(x, V), V) must give x back. Each trial also
// flips one control bit; every one of the 80 control bits must change the
// output in at least one of its trials. (A single flip need not: an element
// with input x1=0, x2=1 gives the same output for both control values.)
module xo64_f32_80_tb;
  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;

  // x, V, F(x,V)
  localparam logic [143:0] KAT [4] = '{
    {32'h73cf256d, 80'hc7fdec99db5b8f4ddda1, 32'h501b8a97},
    {32'h7734d7c1, 80'h309d965edae4820173ab, 32'h77489a46},
    {32'h2f45e678, 80'h9d2ca13f79cb830ccdcc, 32'h6e54d05e},
    {32'hcb008853, 80'h244c4dab725318182fa9, 32'h7505f78a}};

  logic [31:0] x, y, z, y_flip;
  logic [79:0] v, v_flip;
  logic [79:0] acted = '0;

  xo64_f32_80     dut   (.din(x), .v(v),      .dout(y));
  xo64_f32_80_inv u_inv (.din(y), .v(v),      .dout(z));
  xo64_f32_80     dut_f (.din(x), .v(v_flip), .dout(y_flip));

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
      {x, v, v_flip} = {KAT[i][143:32], 80'd0};
      @(posedge clk);
      checks++;
      if (y !== KAT[i][31:0]) begin
        failures++;
        $display("FAIL F(%h, %h)=%h expected %h", x, v, y, KAT[i][31:0]);
      end
    end
    for (int i = 0; i < 1000; i++) begin
      x = $urandom;
      v = {$urandom, $urandom, $urandom};
      v_flip = v ^ (80'd1 << (i % 80));
      @(posedge clk);
      checks++;
      if (z !== x) begin
        failures++;
        if (failures < 10) $display("FAIL inverse x=%h V=%h got %h", x, v, z);
      end
      if (y_flip !== y) acted[i % 80] = 1'b1;
    end
    for (int b = 0; b < 80; b++) begin
      checks++;
      if (!acted[b]) begin
        failures++;
        $display("FAIL control bit %0d never changed the output", b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
