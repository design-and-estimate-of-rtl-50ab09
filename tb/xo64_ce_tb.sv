// xo64_ce_tb -- exhaustive test of the controlled element S_2/1.
//
// Applies all eight (v, x1, x2) combinations and compares with the truth table
// of the two substitutions (v=0: y1=x1, y2=x1^x2; v=1: y1=x1^~x2, y2=x2),
// checks that each substitution is an involution (two cells in series give the
// input back) and that y1, y2 and y1^y2 are balanced over the eight inputs.
module xo64_ce_tb;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0, cycles = 0;
  logic [1:0] x, y, y2;
  logic       v;

  // expected {y2,y1} indexed by {v,x2,x1}
  localparam logic [1:0] EXP [8] = '{2'b00, 2'b11, 2'b10, 2'b01,   // v=0
                                     2'b01, 2'b00, 2'b10, 2'b11};  // v=1

  xo64_ce dut  (.x(x), .v(v), .y(y));
  xo64_ce dut2 (.x(y), .v(v), .y(y2));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n1, n2, n12;
    n1 = 0; n2 = 0; n12 = 0;
    for (int i = 0; i < 8; i++) begin
      {v, x[1], x[0]} = 3'(i);
      @(posedge clk);
      checks++;
      if (y !== EXP[i]) begin
        failures++;
        $display("FAIL v=%0d x=%b: y=%b expected %b", v, x, y, EXP[i]);
      end
      checks++;
      if (y2 !== x) begin
        failures++;
        $display("FAIL involution v=%0d x=%b: got %b", v, x, y2);
      end
      n1 += y[0]; n2 += y[1]; n12 += y[0] ^ y[1];
    end
    checks++;
    if (n1 != 4 || n2 != 4 || n12 != 4) begin
      failures++;
      $display("FAIL balance %0d %0d %0d", n1, n2, n12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
