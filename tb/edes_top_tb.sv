// edes_top_tb: end-to-end test of the EDES unit at its default (and only) size.
//
// A host process keeps the Data-In register filled from a queue of jobs (block, mode) and
// sets the ENCRYPT/DECRYPT pin for the block it writes; a monitor takes every ITERATION READY
// pulse and compares Data-Out with the reference cipher. Phases:
//  1. ten plaintext blocks encrypted back to back with one key (the functional test set),
//  2. the ten ciphertexts decrypted back to back, which must return the plaintexts,
//  3. blocks alternating between encryption and decryption, back to back (mode switch),
//  3b. a new key loaded while an encryption runs: the next encryption must not chain, so
//     that its load word brings the new key into the key-shift registers,
//  4. a new key loaded between blocks, then blocks with START dropped and raised between
//     them (idle restart),
//  5. a key with a parity error, which must raise Key Error.
// Timing checks: the result is captured 17 cycles after an unchained launch (load word + 16
// rounds) or 16 cycles after a chained one (the block was loaded in the last round of the
// previous block), and ITERATION READY is seen on the next edge; results of chained blocks
// are 16 cycles apart (96 bits per 16 cycles, 90 Mbit/s at 15 MHz). Chaining is expected
// exactly when sys_ctrl's rule allows it (next block decrypts, or encryption follows
// encryption with no key load in between). Mechanisms counted: encryption, decryption,
// chained continuation, unchained back-to-back continuation, mode switch, write of the next
// block while a block is running, key reload, idle restart, key parity error; one that never
// occurs is a failure.
module edes_top_tb;
  import edes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [95:0]  data_in, data_out;
  logic [127:0] key_in, key;
  logic load_data = 0, load_key = 0, start = 0, encrypt = 1;
  logic input_reg_empty, iteration_ready, key_reg_full, key_error, busy;

  edes_top u_dut (.clk, .rst_n, .data_in, .load_data, .key_in, .load_key, .start, .encrypt,
                  .input_reg_empty, .iteration_ready, .key_reg_full, .key_error, .busy, .data_out);

  always #5 clk = ~clk;

  typedef struct { logic [95:0] blk; logic enc; logic [127:0] key; } job_t;
  job_t to_send [$];
  job_t in_flight [$];
  logic [95:0] results [$];

  int cycle = 0;
  int last_result_cycle = -1;
  int n_enc = 0, n_dec = 0, n_b2b = 0, n_switch = 0, n_write_busy = 0, n_key_reload = 0;
  int n_idle_restart = 0, n_key_error = 0, n_chain = 0, n_reload_stream = 0;
  logic key_since_load = 1;
  logic launch_chained [$];
  logic prev_mode_enc = 1, have_prev = 0;
  int launch_cycle [$];

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  // Host: write the next queued block whenever the input register is empty.
  always @(negedge clk) begin
    load_data <= 0;
    if (rst_n && input_reg_empty && !load_data && to_send.size() > 0) begin
      job_t j;
      j = to_send.pop_front();
      data_in   <= j.blk;
      encrypt   <= j.enc;
      load_data <= 1;
      in_flight.push_back(j);
      if (busy) n_write_busy++;
    end
  end

  // Launch observer (white box, for the latency check and mechanism counts).
  always @(posedge clk) begin
    if (rst_n && u_dut.launch) begin
      logic exp_chain;
      exp_chain = busy && (!encrypt || (prev_mode_enc && !key_since_load));
      check(u_dut.chain === exp_chain, $sformatf("chain=%b expected %b", u_dut.chain, exp_chain));
      launch_cycle.push_back(cycle);
      launch_chained.push_back(u_dut.chain);
      if (busy && encrypt && prev_mode_enc && key_since_load) n_reload_stream++;
      if (!u_dut.chain) key_since_load = 0;
      if (have_prev && prev_mode_enc != encrypt) n_switch++;
      if (have_prev && !busy) n_idle_restart++;
      prev_mode_enc = encrypt;
      have_prev = 1;
    end
  end

  // Monitor: one result per ITERATION READY pulse.
  always @(posedge clk) begin
    if (rst_n && iteration_ready) begin
      job_t j;
      logic [95:0] exp;
      int lc;
      j   = in_flight.pop_front();
      exp = j.enc ? ref_encrypt(j.blk, j.key) : ref_decrypt(j.blk, j.key);
      check(data_out === exp, $sformatf("%s of %h: got %h expected %h",
            j.enc ? "encrypt" : "decrypt", j.blk, data_out, exp));
      results.push_back(data_out);
      if (j.enc) n_enc++; else n_dec++;
      lc = launch_cycle.pop_front();
      // Unchained: launch sampled at edge lc; the load word runs after edge lc, rounds 1..16
      // after edges lc+1..lc+16, the capture happens at edge lc+17 and the ready pulse is
      // sampled at lc+18. Chained: round 1 runs right after edge lc, one cycle earlier.
      if (launch_chained.pop_front()) begin
        check(cycle - lc == 17, $sformatf("chained latency %0d cycles from launch edge", cycle - lc));
        check(cycle - last_result_cycle == 16, "chained results 16 cycles apart");
        n_chain++;
      end else begin
        check(cycle - lc == 18, $sformatf("latency %0d cycles from launch edge", cycle - lc));
        if (last_result_cycle >= 0 && cycle - last_result_cycle == 17) n_b2b++;
      end
      last_result_cycle = cycle;
    end
  end

  task automatic load_new_key(input logic [127:0] k);
    @(negedge clk);
    key_in = k; load_key = 1; key_since_load = 1;
    @(negedge clk);
    load_key = 0;
    key = k;
  endtask

  task automatic wait_drain();
    int guard;
    guard = 0;
    while ((to_send.size() > 0 || in_flight.size() > 0) && guard < 5000) begin
      @(posedge clk);
      guard++;
    end
    check(guard < 5000, "queue drained");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [95:0] pts [10];
    logic [95:0] cts [10];
    data_in = '0; key_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(key_reg_full === 1'b0 && input_reg_empty === 1'b1 && !busy, "state after reset");

    // Phase 1: ten plaintexts, encrypted back to back.
    load_new_key(odd_parity({$urandom, $urandom, $urandom, $urandom}));
    check(key_reg_full === 1'b1 && key_error === 1'b0, "key loaded without error");
    for (int i = 0; i < 10; i++) begin
      pts[i] = {$urandom, $urandom, $urandom};
      to_send.push_back('{blk: pts[i], enc: 1'b1, key: key});
    end
    start = 1;
    wait_drain();
    for (int i = 0; i < 10; i++) cts[i] = results[i];

    // Phase 2: decrypt the ten ciphertexts, back to back; they must give the plaintexts.
    for (int i = 0; i < 10; i++) to_send.push_back('{blk: cts[i], enc: 1'b0, key: key});
    wait_drain();
    for (int i = 0; i < 10; i++)
      check(results[10 + i] === pts[i], $sformatf("round trip block %0d", i));

    // Phase 3: alternating modes, back to back.
    for (int i = 0; i < 6; i++)
      to_send.push_back('{blk: {$urandom, $urandom, $urandom}, enc: i[0], key: key});
    wait_drain();

    // Phase 3b: new key while an encryption is running, then more encryptions with it.
    to_send.push_back('{blk: {$urandom, $urandom, $urandom}, enc: 1'b1, key: key});
    wait (busy);
    repeat (4) @(posedge clk);
    load_new_key(odd_parity({$urandom, $urandom, $urandom, $urandom}));
    n_key_reload++;
    for (int i = 0; i < 3; i++)
      to_send.push_back('{blk: {$urandom, $urandom, $urandom}, enc: 1'b1, key: key});
    wait_drain();

    // Phase 4: new key, then blocks separated by START going low.
    start = 0;
    repeat (5) @(posedge clk);
    load_new_key(odd_parity({$urandom, $urandom, $urandom, $urandom}));
    n_key_reload++;
    for (int i = 0; i < 4; i++) begin
      logic [95:0] p;
      p = {$urandom, $urandom, $urandom};
      to_send.push_back('{blk: p, enc: 1'b1, key: key});
      @(negedge clk);
      start = 1;
      repeat (4) @(negedge clk);
      start = 0;
      wait_drain();
      check(results[results.size() - 1] === ref_encrypt(p, key), "result after reload");
      repeat (3) @(negedge clk);
    end

    // Phase 5: parity error on the key.
    load_new_key(odd_parity({$urandom, $urandom, $urandom, $urandom}) ^ (128'(1) << 77));
    check(key_error === 1'b1, "key error raised");
    if (key_error) n_key_error++;
    load_new_key(odd_parity({$urandom, $urandom, $urandom, $urandom}));
    check(key_error === 1'b0, "key error cleared by a good key");

    check(results.size() == 34, $sformatf("34 results, got %0d", results.size()));
    $display("mechanisms: enc=%0d dec=%0d chained=%0d back_to_back_unchained=%0d mode_switch=%0d write_while_busy=%0d key_reload=%0d reload_while_streaming=%0d idle_restart=%0d key_error=%0d",
             n_enc, n_dec, n_chain, n_b2b, n_switch, n_write_busy, n_key_reload, n_reload_stream, n_idle_restart, n_key_error);
    check(n_enc > 0, "encryption happened");
    check(n_dec > 0, "decryption happened");
    check(n_chain > 0, "chained blocks happened");
    check(n_b2b > 0, "unchained back-to-back blocks happened");
    check(n_switch > 0, "mode switch happened");
    check(n_write_busy > 0, "write while busy happened");
    check(n_key_reload > 0, "key reload happened");
    check(n_reload_stream > 0, "key reload while streaming happened");
    check(n_idle_restart > 0, "idle restart happened");
    check(n_key_error > 0, "key error happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
