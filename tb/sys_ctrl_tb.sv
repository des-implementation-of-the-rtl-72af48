// sys_ctrl_tb: launch rule and mode latch of the system-level controller. Every combination
// of START, key loaded, input full, busy and last is applied with both ENCRYPT values, then
// random input sequences; launch must equal START & key & full & (!busy | last), and the
// mode bit must take ~ENCRYPT only on a launch. A model of the "key reloaded since the last load word" flag gives the
// expected chain output: a launch on the last word chains when the next block decrypts, or
// when it encrypts after an encryption with no LOAD KEY since the last unchained launch.
module sys_ctrl_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, encrypt, load_key, key_full, din_full, busy, last, launch, chain, decrypt, m_dec, m_new;

  sys_ctrl u_dut (.clk, .rst_n, .start, .encrypt, .load_key, .key_full, .din_full, .busy,
                  .last, .launch, .chain, .decrypt);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {start, encrypt, load_key, key_full, din_full, busy, last} = '0;
    @(negedge clk);
    rst_n = 1; m_dec = 0; m_new = 1;
    repeat (8) begin
      for (int v = 0; v < 128; v++) begin
        logic exp, exp_chain;
        @(negedge clk);
        {start, encrypt, key_full, din_full, busy, last} = (v < 64) ? 6'(v) : 6'($urandom);
        load_key = ($urandom % 32) == 0;
        #1;
        exp = start & key_full & din_full & (!busy | last);
        exp_chain = exp & busy & (!encrypt | (!m_dec & !m_new));
        checks++;
        if (launch !== exp || chain !== exp_chain) begin
          failures++;
          $display("FAIL launch=%b chain=%b expected %b %b for %b", launch, chain, exp, exp_chain, v);
        end
        if (exp) m_dec = ~encrypt;
        if (load_key) m_new = 1;
        else if (exp && !exp_chain) m_new = 0;
        @(posedge clk); #1;
        checks++;
        if (decrypt !== m_dec) begin failures++; $display("FAIL mode %b expected %b", decrypt, m_dec); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
