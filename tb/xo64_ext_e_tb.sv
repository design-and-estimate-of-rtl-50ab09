// xo64_ext_e_tb -- test of the extension box E.
//
// Builds the expected control vector from part-selects of X
// (v1 = x[15:0], v2 = x[31:16], v3 = x[20:5], v4 = {x[4:0], x[31:21]},
// v5 = x[25:10]) and compares for walking-one words and 500 random words.
module xo64_ext_e_tb;
  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;

  logic [31:0] x;
  logic [79:0] v, exp;

  xo64_ext_e dut (.x(x), .v(v));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [31:0] val);
    x = val;
    @(posedge clk);
    exp = {x[25:10], x[4:0], x[31:21], x[20:5], x[31:16], x[15:0]};
    checks++;
    if (v !== exp) begin
      failures++;
      $display("FAIL E(%h)=%h expected %h", x, v, exp);
    end
  endtask

  initial begin
    check_one(32'h12345678);
    checks++;
    if (v !== 80'h8d15c091a2b312345678) begin
      failures++;
      $display("FAIL E(12345678) known answer %h", v);
    end
    for (int i = 0; i < 32; i++) check_one(32'd1 << i);
    for (int i = 0; i < 500; i++) check_one($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
