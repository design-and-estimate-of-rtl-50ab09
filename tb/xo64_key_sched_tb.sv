// xo64_key_sched_tb -- test of the round key selection.
//
// Uses a key whose four words are recognisable (word n holds n in every byte)
// and checks K_j and K'_j for j = 1..9 in both directions against the key
// schedule table, plus one random key for every entry.
module xo64_key_sched_tb;
  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;

  // "K_j/K'_j" indices as two decimal digits, j = 1..9
  localparam int ENC [9] = '{12, 34, 31, 41, 23, 34, 12, 43, 13};
  localparam int DEC [9] = '{13, 34, 21, 43, 32, 14, 13, 43, 12};

  logic [127:0] key;
  logic         dec;
  logic [3:0]   j;
  logic [31:0]  k, kp;

  xo64_key_sched dut (.key(key), .dec(dec), .j(j), .k(k), .kp(kp));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] word(logic [127:0] kk, int n);
    case (n)
      1: return kk[127:96];
      2: return kk[95:64];
      3: return kk[63:32];
      default: return kk[31:0];
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 2; t++) begin
      key = (t == 0) ? 128'h01010101_02020202_03030303_04040404
                     : {$urandom, $urandom, $urandom, $urandom};
      for (int d = 0; d < 2; d++) begin
        for (int jj = 1; jj <= 9; jj++) begin
          int e;
          dec = d[0];
          j   = 4'(jj);
          e   = d ? DEC[jj-1] : ENC[jj-1];
          @(posedge clk);
          checks++;
          if (k !== word(key, e / 10) || kp !== word(key, e % 10)) begin
            failures++;
            $display("FAIL dec=%0d j=%0d: K=%h K'=%h expected K%0d/K%0d", d, jj, k, kp, e / 10, e % 10);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
