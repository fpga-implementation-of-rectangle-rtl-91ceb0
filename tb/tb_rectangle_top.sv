// tb_rectangle_top -- end-to-end test of the RECTANGLE-80 core at its default
// configuration.
//
// Encrypts two fixed test vectors whose ciphertexts are written out here
// (all-zero plaintext and key; all-ones plaintext with all-zero key), then
// random plaintext/key pairs checked against the reference model. For every
// encryption it checks that 'done' stays low for 24 clocks after the load
// edge and rises on the 25th, and that the result is held after 'done'.
// It also restarts an encryption part-way through and checks that the new
// one completes correctly. Each mechanism (load, iteration, hold after done,
// restart during a run) is counted; one that never occurs is a failure.
module tb_rectangle_top;
  import rectangle_ref_pkg::*;

  localparam int N_RANDOM = 200;

  logic        clk = 0, load = 0, done;
  logic [63:0] plaintext = '0, ciphertext;
  logic [79:0] key = '0;
  int checks = 0, failures = 0;
  int n_load = 0, n_iter = 0, n_hold = 0, n_restart = 0;

  rectangle_top dut (
    .clk(clk), .load(load), .plaintext(plaintext), .key(key),
    .ciphertext(ciphertext), .done(done)
  );

  always #5 clk = ~clk;

  // Round iterations actually performed by the core.
  always @(posedge clk) if (!load && !done) n_iter++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic start(input logic [63:0] pt, input logic [79:0] k);
    plaintext = pt;
    key = k;
    load = 1;
    @(posedge clk);
    n_load++;
    #1 load = 0;
    plaintext = {$urandom, $urandom};   // inputs are only sampled on load
    key = 80'({$urandom, $urandom, $urandom});
  endtask

  task automatic encrypt(input logic [63:0] pt, input logic [79:0] k, input logic [63:0] expected);
    int cycles = 0;
    start(pt, k);
    while (!done && cycles < 100) begin
      @(posedge clk);
      #1;
      cycles++;
    end
    checks += 2;
    if (cycles != 25) begin
      failures++;
      $display("FAIL latency %0d clocks, expected 25", cycles);
    end
    if (ciphertext !== expected) begin
      failures++;
      $display("FAIL pt=%h key=%h ct=%h exp=%h", pt, k, ciphertext, expected);
    end
    repeat (3) @(posedge clk);
    #1;
    n_hold++;
    checks++;
    if (!done || ciphertext !== expected) begin
      failures++;
      $display("FAIL result not held: done=%b ct=%h", done, ciphertext);
    end
  endtask

  initial begin
    logic [63:0] pt;
    logic [79:0] k;
    @(posedge clk);
    #1;
    // Fixed vectors.
    encrypt(64'h0, 80'h0, 64'h0874_E8B1_E354_2D96);
    encrypt(64'hFFFF_FFFF_FFFF_FFFF, 80'h0, 64'h4B12_3CD0_3F48_2FD5);
    // The reference model must agree with the fixed vectors too.
    checks += 2;
    if (ref_encrypt(64'h0, 80'h0) !== 64'h0874_E8B1_E354_2D96) failures++;
    if (ref_encrypt('1, 80'h0) !== 64'h4B12_3CD0_3F48_2FD5) failures++;
    encrypt(64'h0000_0000_1215_3524, 80'hFFFF_FFFF_FFFF_C089_5E81,
            ref_encrypt(64'h0000_0000_1215_3524, 80'hFFFF_FFFF_FFFF_C089_5E81));
    // Random vectors.
    for (int i = 0; i < N_RANDOM; i++) begin
      pt = {$urandom, $urandom};
      k  = 80'({$urandom, $urandom, $urandom});
      encrypt(pt, k, ref_encrypt(pt, k));
    end
    // Restart: abandon a run after a random number of rounds, load anew.
    for (int i = 0; i < 5; i++) begin
      start({$urandom, $urandom}, 80'({$urandom, $urandom, $urandom}));
      repeat (1 + $urandom % 20) @(posedge clk);
      #1;
      n_restart++;
      pt = {$urandom, $urandom};
      k  = 80'({$urandom, $urandom, $urandom});
      encrypt(pt, k, ref_encrypt(pt, k));
    end
    $display("mechanisms: load=%0d iteration=%0d hold=%0d restart=%0d",
             n_load, n_iter, n_hold, n_restart);
    checks += 4;
    if (n_load == 0) failures++;
    if (n_iter == 0) failures++;
    if (n_hold == 0) failures++;
    if (n_restart == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
