// key_gen_tb: the key generation circuit driven through the controller's key sequences.
//  Encryption: load, then shifts 1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1 must give K1..K16.
//  Decryption (reverse mode): load, load, then the schedule backwards must give K16..K1.
// K1 uses the DES example key 133457799BBCDFF1 (K1,1 = 1B02EFFC7072, K1,16 = CB3D8B0E17F5);
// K2 is random; all sub-keys are compared with the reference schedule.
module key_gen_tb;
  import edes_pkg::*;
  import edes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, reverse = 0;
  key_op_e op;
  logic [55:0] k1_cd, k2_cd;
  logic [47:0] k1_sub, k2_sub;
  logic [63:0] key1, key2;
  sched_t s1, s2;

  key_gen u_dut (.clk, .rst_n, .en, .op, .reverse, .k1_cd, .k2_cd, .k1_sub, .k2_sub);

  always #5 clk = ~clk;

  task automatic expect_keys(input int r);
    checks++;
    if (k1_sub !== s1[r-1] || k2_sub !== s2[r-1]) begin
      failures++;
      $display("FAIL rev=%0d round %0d: %h %h expected %h %h", reverse, r, k1_sub, k2_sub, s1[r-1], s2[r-1]);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = KEY_LOAD;
    key1 = 64'h133457799BBCDFF1;
    for (int trial = 0; trial < 8; trial++) begin
      if (trial > 0) key1 = {$urandom, $urandom};
      key2 = {$urandom, $urandom};
      k1_cd = ref_pc1(key1); k2_cd = ref_pc1(key2);
      s1 = ref_schedule(key1); s2 = ref_schedule(key2);
      if (trial == 0) begin
        checks++;
        if (s1[0] !== 48'h1B02EFFC7072 || s1[15] !== 48'hCB3D8B0E17F5) begin
          failures++; $display("FAIL reference schedule");
        end
      end
      rst_n = 1;
      // encryption sequence
      @(negedge clk); reverse = 0; en = 1; op = KEY_LOAD;
      for (int r = 1; r <= 16; r++) begin
        @(negedge clk);
        op = (SHIFTS[r-1] == 2) ? KEY_SHIFT2 : KEY_SHIFT1;
        #1 expect_keys(r);
      end
      // decryption sequence
      @(negedge clk); reverse = 1; op = KEY_LOAD;
      for (int w = 1; w <= 16; w++) begin
        @(negedge clk);
        op = (w == 1) ? KEY_LOAD : ((SHIFTS[17-w] == 2) ? KEY_SHIFT2 : KEY_SHIFT1);
        #1 expect_keys(17 - w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
