// xo64_sbox4_tb -- test of the 4x4 S-boxes S_0..S_7 and their inverses.
//
// All sixteen boxes (eight direct, eight inverse) are instantiated. For every
// box and every input it checks that the direct box matches row 0 of the
// corresponding DES S-box (typed here from the DES standard) and that the
// inverse box undoes the direct one.
module xo64_sbox4_tb;
  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;

  // Row 0 of DES S1..S8, one hex digit per input, input 0 leftmost.
  localparam logic [63:0] DES_ROW0 [8] = '{
    64'hE4D12FB83A6C5907, 64'hF18E6B34972DC05A, 64'hA09E63F51DC7B428, 64'h7DE3069A1285BC4F,
    64'h2C417AB6853FD0E9, 64'hC1AF92680D34E75B, 64'h4B2EF08D3C975A61, 64'hD2846FB1A93E50C7};

  logic [3:0] din;
  logic [3:0] dir_out [8];
  logic [3:0] inv_out [8];

  for (genvar k = 0; k < 8; k++) begin : g_box
    xo64_sbox4 #(.IDX(k), .INV(1'b0)) u_dir (.din(din),        .dout(dir_out[k]));
    xo64_sbox4 #(.IDX(k), .INV(1'b1)) u_inv (.din(dir_out[k]), .dout(inv_out[k]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      din = 4'(i);
      @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        logic [3:0] exp;
        exp = DES_ROW0[k][4*(15 - i) +: 4];
        checks++;
        if (dir_out[k] !== exp) begin
          failures++;
          $display("FAIL S_%0d(%h)=%h expected %h", k, din, dir_out[k], exp);
        end
        checks++;
        if (inv_out[k] !== din) begin
          failures++;
          $display("FAIL S_%0d^-1(S_%0d(%h))=%h", k, k, din, inv_out[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
