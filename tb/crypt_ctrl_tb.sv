// crypt_ctrl_tb: the controller word sequences. For both modes it checks, word by word, the
// load select, key operation, clock enables, the Data-Out clock and the end bit against the
// DES shift schedule (forward for encryption, backward after a reload for decryption), that
// a sequence lasts 17 cycles, that a launch on the last word restarts without a gap, that a
// chained launch restarts at word 1 (16 cycles, no load word), and that the controller goes
// idle (all enables low) otherwise.
module crypt_ctrl_tb;
  import edes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, launch = 0, chain = 0, decrypt = 0, busy;
  logic [4:0] count;
  ctrl_word_t ctrl;

  crypt_ctrl u_dut (.clk, .rst_n, .launch, .chain, .decrypt, .ctrl, .busy, .count);

  always #5 clk = ~clk;

  function automatic ctrl_word_t expected(input int w, input logic dec);
    ctrl_word_t e;
    e.ld_sel  = (w == 0);
    e.key_clk = 1'b1;
    e.abc_clk = 1'b1;
    e.out_clk = (w == 16);
    e.last    = (w == 16);
    if (w == 0)               e.key_op = KEY_LOAD;
    else if (!dec)            e.key_op = (SHIFTS[w-1] == 2) ? KEY_SHIFT2 : KEY_SHIFT1;
    else if (w == 1)          e.key_op = KEY_LOAD;
    else                      e.key_op = (SHIFTS[17-w] == 2) ? KEY_SHIFT2 : KEY_SHIFT1;
    return e;
  endfunction

  // Checks words first_w..16 of one block; on word 16 requests the next launch, chained or not.
  task automatic run_block(input logic dec, input int first_w, input logic back_to_back,
                           input logic next_chain);
    for (int w = first_w; w <= 16; w++) begin
      @(negedge clk);
      launch = (w == 16) && back_to_back;
      chain  = (w == 16) && back_to_back && next_chain;
      checks++;
      if (!busy || ctrl !== expected(w, dec)) begin
        failures++;
        $display("FAIL dec=%0d word %0d: %b expected %b", dec, w, ctrl, expected(w, dec));
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy || ctrl !== '0) begin failures++; $display("FAIL idle after reset"); end
    begin
      logic chained, next_chain;
      chained = 0;
      for (int t = 0; t < 9; t++) begin
        decrypt = t[0];
        launch = 1;
        next_chain = (t % 3) != 2;
        run_block(decrypt, chained ? 1 : 0, t < 8, next_chain);
        chained = next_chain;
        launch = 0;
      end
    end
    @(negedge clk);
    checks++;
    if (busy || ctrl !== '0) begin failures++; $display("FAIL not idle after last block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
