// xo64_nessie_tb -- diffusion statistics of XO-64 for 1 to 8 rounds.
//
// Eight copies of the core, built with ROUNDS = 1..8, encrypt the same inputs in
// parallel. For NS random (plaintext, key) samples each copy encrypts the
// sample and every variant with one input bit flipped; from the changed
// ciphertext bits the four dependence criteria are computed per round count,
// once for plaintext bits and once for key bits:
//   d1  = mean number of output bits changed by one input bit    (ideal 32)
//   dc  = fraction of (input bit, output bit) pairs ever affected  (ideal 1)
//   da  = 1 - mean |2*w_i/NS - 64| / 64 over input bits i          (ideal 1)
//   dsa = 1 - mean |2*a_ij/NS - 1| over bit pairs                   (ideal 1)
// with w_i the total output change for input bit i and a_ij the number of
// samples in which flipping input bit i changed output bit j.
// The cipher is expected to reach full diffusion after two rounds. Checked:
// from two rounds on, 31 < d1 < 33, dc = 1 and da > 0.97; one round diffuses
// less than two (smaller da); dsa > 0.89 at eight rounds. dsa approaches 0.99
// only with many samples: with 100 samples the sampling noise alone holds it
// near 0.92. The one-round figures are printed, not checked against limits.
module xo64_nessie_tb;
  localparam int NS = 100;
  localparam int NR = 8;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid;
  logic [127:0] in_key;
  logic [63:0]  in_data;
  logic         in_ready  [NR];
  logic         out_valid [NR];
  logic [63:0]  out_data  [NR];

  int checks = 0, failures = 0, cycles = 0;

  for (genvar r = 0; r < NR; r++) begin : g_core
    xo64 #(.ROUNDS(r + 1)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready[r]),
      .in_dec(1'b0), .in_key(in_key), .in_data(in_data),
      .out_valid(out_valid[r]), .out_data(out_data[r]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 500000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Encrypt one block on all eight cores; c[r] is the result of ROUNDS = r+1.
  task automatic encrypt(input logic [63:0] p, input logic [127:0] k, output logic [63:0] c [NR]);
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = p;
    in_key   = k;
    if (!in_ready[NR-1]) begin
      failures++;
      $display("FAIL core not ready");
    end
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid[NR-1]) @(negedge clk);
    for (int r = 0; r < NR; r++) c[r] = out_data[r];
  endtask

  int  a [NR][128][64];
  int  w [NR][128];
  real da_of [NR];

  task automatic run(input bit on_key);
    int           nin;
    logic [63:0]  p, d;
    logic [63:0]  c0 [NR];
    logic [63:0]  c1 [NR];
    logic [127:0] k;
    nin = on_key ? 128 : 64;
    for (int r = 0; r < NR; r++)
      for (int i = 0; i < nin; i++) begin
        w[r][i] = 0;
        for (int j = 0; j < 64; j++) a[r][i][j] = 0;
      end
    for (int s = 0; s < NS; s++) begin
      p = {$urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, c0);
      for (int i = 0; i < nin; i++) begin
        if (on_key) encrypt(p, k ^ (128'd1 << i), c1);
        else        encrypt(p ^ (64'd1 << i), k, c1);
        for (int r = 0; r < NR; r++) begin
          d = c0[r] ^ c1[r];
          w[r][i] += $countones(d);
          for (int j = 0; j < 64; j++) a[r][i][j] += int'(d[j]);
        end
      end
    end
    for (int r = 0; r < NR; r++) begin
      real d1, dc, da, dsa;
      d1 = 0.0; dc = 0.0; da = 0.0; dsa = 0.0;
      for (int i = 0; i < nin; i++) begin
        real dev;
        d1 += real'(w[r][i]);
        dev = 2.0 * real'(w[r][i]) / NS - 64.0;
        da += (dev < 0.0) ? -dev : dev;
        for (int j = 0; j < 64; j++) begin
          real e;
          if (a[r][i][j] > 0) dc += 1.0;
          e = 2.0 * real'(a[r][i][j]) / NS - 1.0;
          dsa += (e < 0.0) ? -e : e;
        end
      end
      d1  = d1 / (nin * NS);
      dc  = dc / (nin * 64);
      da  = 1.0 - da / (nin * 64);
      dsa = 1.0 - dsa / (nin * 64);
      da_of[r] = da;
      $display("%s bits, %0d round(s): d1=%f dc=%f da=%f dsa=%f",
               on_key ? "key" : "plaintext", r + 1, d1, dc, da, dsa);
      if (r > 0) begin
        checks++;
        if (!(d1 > 31.0 && d1 < 33.0)) begin failures++; $display("FAIL d1 out of range"); end
        checks++;
        if (dc != 1.0) begin failures++; $display("FAIL dc below 1"); end
        checks++;
        if (!(da > 0.97)) begin failures++; $display("FAIL da too low"); end
      end
      if (r == NR - 1) begin
        checks++;
        if (!(dsa > 0.89)) begin failures++; $display("FAIL dsa too low"); end
      end
    end
    checks++;
    if (!(da_of[0] < da_of[1])) begin
      failures++;
      $display("FAIL one round diffuses no less than two");
    end
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_key   = '0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
