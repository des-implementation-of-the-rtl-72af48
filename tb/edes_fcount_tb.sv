// edes_fcount_tb: measures on the round hardware how often each sub-block passes through an
// f function during the 16 encryption rounds.
//
// For each input sub-block of edes_round the test flips one random bit and looks for the
// output that changes by exactly that bit: that output is where the sub-block goes. It goes
// either straight through a wire (B -> A, no f) or through an XOR array where an f output is
// added (A -> C, C -> B, one f each). Following each start position for 16 rounds must give
// the counts of the EDES design: A0 ends in C16 after 11 f operations, B0 in A16 after 10
// and C0 in B16 after 11. DES, for comparison, applies 8 to each half.
module edes_fcount_tb;
  int checks = 0, failures = 0;
  logic [31:0] a, b, c, a_n, b_n, c_n;
  logic [47:0] k1, k2;
  logic        decrypt = 1'b0;

  edes_round u_dut (.a, .b, .c, .k1, .k2, .decrypt, .a_next(a_n), .b_next(b_n), .c_next(c_n));

  int dest [3];     // output position of input position 0 = A, 1 = B, 2 = C
  int uses_f [3];   // 1 when that path goes through an XOR array with an f output

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [95:0] base_out, flip_out, delta;
    logic [31:0] mask;
    int exp_end [3] = '{2, 0, 1};     // A0 -> C16, B0 -> A16, C0 -> B16
    int exp_cnt [3] = '{11, 10, 11};
    string nm [3] = '{"A", "B", "C"};

    // Measure the path of each input position, over several random contexts.
    for (int trial = 0; trial < 20; trial++) begin
      for (int p = 0; p < 3; p++) begin
        int found;
        a = $urandom; b = $urandom; c = $urandom;
        k1 = {$urandom, $urandom}; k2 = {$urandom, $urandom};
        #1 base_out = {a_n, b_n, c_n};
        mask = 32'(1) << ($urandom % 32);
        case (p)
          0: a ^= mask;
          1: b ^= mask;
          default: c ^= mask;
        endcase
        #1 flip_out = {a_n, b_n, c_n};
        delta = base_out ^ flip_out;
        found = -1;
        for (int q = 0; q < 3; q++)
          if (delta[95 - 32*q -: 32] == mask) found = q;
        checks++;
        if (found < 0) begin failures++; $display("FAIL no linear path for input %s", nm[p]); end
        else if (trial > 0 && found != dest[p]) begin
          failures++; $display("FAIL path of %s changes between trials", nm[p]);
        end
        dest[p]   = found;
        uses_f[p] = (found == 0) ? 0 : 1;   // A output is a plain wire, B and C go through XOR arrays
      end
    end

    for (int start = 0; start < 3; start++) begin
      int pos, cnt;
      pos = start;
      cnt = 0;
      for (int r = 0; r < 16; r++) begin
        cnt += uses_f[pos];
        pos = dest[pos];
      end
      $display("%s0 -> position %s after 16 rounds, %0d f operations", nm[start], nm[pos], cnt);
      checks++;
      if (pos != exp_end[start] || cnt != exp_cnt[start]) begin
        failures++;
        $display("FAIL %s0: expected %s16 after %0d f operations", nm[start], nm[exp_end[start]], exp_cnt[start]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
