// xo64_tb -- end-to-end test of the iterative XO-64 core at its default size.
//
// Phase 1 encrypts five known-answer blocks and decrypts each result right
// after it, alternating the direction from block to block (answers from a
// separate software model of the cipher). Phase 2 encrypts 200 random blocks
// under random keys, with random idle gaps, and phase 3 decrypts the collected
// ciphertexts and expects the plaintexts back.
//
// Timing checks: every result must appear exactly 8 cycles after the edge that
// accepted its block (out_valid is seen at the 9th sampling edge), and blocks
// offered back to back must complete every 8 cycles.
// The test counts how often each mechanism of the core occurs and fails if one
// never does: encryption, decryption, a direction change between consecutive
// blocks, a key change between consecutive blocks, a block accepted in the
// cycle the previous one finishes (back to back), an input held waiting while
// the core is busy, and an idle core.
module xo64_tb;
  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid, in_ready, in_dec, out_valid;
  logic [127:0] in_key;
  logic [63:0]  in_data, out_data;

  int checks = 0, failures = 0, cycles = 0;

  xo64 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // key, plaintext, ciphertext
  localparam logic [255:0] KAT [5] = '{
    {128'h00000000000000000000000000000000, 64'h0000000000000000, 64'hc05d8d86754e02a2},
    {128'h0123456789abcdeffedcba9876543210, 64'h0011223344556677, 64'h6d7baaf323445b51},
    {128'hffffffffffffffffffffffffffffffff, 64'hffffffffffffffff, 64'h92871fec1b07a6e9},
    {128'h03d71684d4ea65d08743feb6102b938b, 64'h0f3ebdd309208a65, 64'hece92ba9ed4d10cc},
    {128'h30b17d0be12b2b8f3deffa3899809225, 64'h07b37e14c7321cc0, 64'h5567541097d4f377}};

  // ---------------- scoreboard ----------------
  typedef struct {
    logic        known;      // expected value is known
    logic [63:0] exp;
  } exp_t;
  exp_t         exp_q[$];
  int           acc_q[$];
  logic [63:0]  results[$];
  int           last_out = -1;
  logic         prev_dec;
  logic [127:0] prev_key;
  logic         have_prev = 1'b0;
  logic         was_back_to_back = 1'b0;

  int n_enc = 0, n_dec = 0, n_dir_change = 0, n_key_change = 0;
  int n_back_to_back = 0, n_stall = 0, n_idle = 0, n_b2b_rate = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (!in_valid && in_ready) n_idle++;
    if (in_valid && in_ready) begin
      // accepted while the previous block is still in its last round
      was_back_to_back = (acc_q.size() != 0);
      if (was_back_to_back) n_back_to_back++;
      acc_q.push_back(cycles);
      if (in_dec) n_dec++; else n_enc++;
      if (have_prev && prev_dec != in_dec) n_dir_change++;
      if (have_prev && prev_key != in_key) n_key_change++;
      prev_dec  = in_dec;
      prev_key  = in_key;
      have_prev = 1'b1;
    end
    if (out_valid) begin
      int   acc;
      exp_t e;
      results.push_back(out_data);
      checks++;
      if (acc_q.size() == 0 || exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", out_data);
      end else begin
        acc = acc_q.pop_front();
        e   = exp_q.pop_front();
        checks++;
        if (cycles - acc != 9) begin
          failures++;
          $display("FAIL latency: accepted at %0d, result seen at %0d", acc, cycles);
        end
        if (e.known && out_data !== e.exp) begin
          failures++;
          $display("FAIL result %h expected %h", out_data, e.exp);
        end
      end
      if (last_out >= 0 && cycles - last_out < 8) begin
        failures++;
        $display("FAIL results only %0d cycles apart", cycles - last_out);
      end
      if (last_out >= 0 && cycles - last_out == 8) n_b2b_rate++;
      last_out = cycles;
    end
  end

  // ---------------- driver ----------------
  task automatic send(input logic [63:0] d, input logic [127:0] k, input logic dec,
                      input logic known, input logic [63:0] exp);
    exp_t e;
    e.known = known;
    e.exp   = exp;
    exp_q.push_back(e);
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = d;
    in_key   = k;
    in_dec   = dec;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
  endtask

  task automatic idle(input int n);
    @(negedge clk);
    in_valid = 1'b0;
    in_data  = {$urandom, $urandom};
    repeat (n) @(negedge clk);
  endtask

  localparam int NRAND = 200;
  logic [63:0]  rnd_pt  [NRAND];
  logic [127:0] rnd_key [NRAND];

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_dec   = 1'b0;
    in_key   = '0;
    in_data  = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    idle(2);

    // phase 1: known answers, directions alternating, back to back
    for (int i = 0; i < 5; i++) begin
      send(KAT[i][127:64], KAT[i][255:128], 1'b0, 1'b1, KAT[i][63:0]);
      send(KAT[i][63:0],   KAT[i][255:128], 1'b1, 1'b1, KAT[i][127:64]);
    end
    idle(12);
    results.delete();

    // phase 2: random encryptions with random gaps
    for (int i = 0; i < NRAND; i++) begin
      rnd_pt[i]  = {$urandom, $urandom};
      rnd_key[i] = {$urandom, $urandom, $urandom, $urandom};
      send(rnd_pt[i], rnd_key[i], 1'b0, 1'b0, '0);
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 12));
    end
    idle(12);
    checks++;
    if (results.size() != NRAND) begin
      failures++;
      $display("FAIL %0d results for %0d blocks", results.size(), NRAND);
    end

    // phase 3: decrypt the ciphertexts back
    for (int i = 0; i < NRAND && i < results.size(); i++) begin
      checks++;
      if (results[i] === rnd_pt[i]) begin
        failures++;
        $display("FAIL ciphertext equals plaintext %h", rnd_pt[i]);
      end
      send(results[i], rnd_key[i], 1'b1, 1'b1, rnd_pt[i]);
    end
    idle(12);

    // every mechanism must have happened
    begin
      int counts [8];
      string names [8];
      counts = '{n_enc, n_dec, n_dir_change, n_key_change, n_back_to_back, n_stall, n_idle, n_b2b_rate};
      names  = '{"encryption", "decryption", "direction change", "key change",
                 "back-to-back accept", "input stall", "idle", "8-cycle block rate"};
      for (int i = 0; i < 8; i++) begin
        $display("  %-20s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", names[i]);
        end
      end
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d blocks without result", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
