// xo64_si_tb -- test of the S_i involution box.
//
// Compares S_i with known answers computed by a separate software model of the
// cipher, then checks on 2000 random words that S_i(S_i(x)) = x.
module xo64_si_tb;
  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;

  localparam logic [31:0] KAT [6][2] = '{
    '{32'h00000000, 32'h7b6a613e},
    '{32'hffffffff, 32'h94b897e3},
    '{32'h01234567, 32'h5f946417},
    '{32'h89abcdef, 32'h96069753},
    '{32'h17362f25, 32'h012c3566},
    '{32'h89e7d15f, 32'hef3de6e4}};

  logic [31:0] x, y, z;
  xo64_si dut  (.din(x), .dout(y));
  xo64_si dut2 (.din(y), .dout(z));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin
      x = KAT[i][0];
      @(posedge clk);
      checks++;
      if (y !== KAT[i][1]) begin
        failures++;
        $display("FAIL S_i(%h)=%h expected %h", x, y, KAT[i][1]);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      x = $urandom;
      @(posedge clk);
      checks++;
      if (z !== x) begin
        failures++;
        if (failures < 10) $display("FAIL S_i(S_i(%h))=%h", x, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
