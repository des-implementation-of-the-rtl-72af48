// edes_round_tb: one round of the datapath against the round equations.
//  * DES example: with A = L0 = CC00CCFF, B = R0 = F0AAF0AA and K1 = 1B02EFFC7072 the left
//    XOR array must give L0 ^ f(R0, K1) = EF4A6544 (the DES R1 of the textbook example).
//  * Random A, B, C, K1, K2 in both modes against the reference f.
//  * A decrypting round with the same sub-keys undoes an encrypting round when A and B are
//    swapped at the input (and come back swapped at the output), which is the property the
//    whole cipher rests on.
module edes_round_tb;
  import edes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, c, a_n, b_n, c_n;
  logic [47:0] k1, k2;
  logic        decrypt;

  edes_round u_dut (.a, .b, .c, .k1, .k2, .decrypt, .a_next(a_n), .b_next(b_n), .c_next(c_n));

  task automatic expect3(input logic [31:0] ea, eb, ec, input string what);
    checks++;
    if (a_n !== ea || b_n !== eb || c_n !== ec) begin
      failures++;
      $display("FAIL %s: got %h %h %h expected %h %h %h", what, a_n, b_n, c_n, ea, eb, ec);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'hCC00CCFF; b = 32'hF0AAF0AA; c = 32'h0; k1 = 48'h1B02EFFC7072; k2 = 48'h0; decrypt = 0;
    #1;
    checks++;
    if (c_n !== 32'hEF4A6544) begin failures++; $display("FAIL DES example: %h", c_n); end

    repeat (300) begin
      a = $urandom; b = $urandom; c = $urandom;
      k1 = {$urandom, $urandom}; k2 = {$urandom, $urandom};
      decrypt = 0; #1;
      expect3(b, c ^ ref_f(b, k2), a ^ ref_f(b, k1), "encrypt round");
      decrypt = 1; #1;
      expect3(b, c ^ ref_f(b, k1), a ^ ref_f(b, k2), "decrypt round");
    end

    repeat (100) begin
      logic [31:0] a0, b0, c0, a1, b1, c1;
      a0 = $urandom; b0 = $urandom; c0 = $urandom;
      k1 = {$urandom, $urandom}; k2 = {$urandom, $urandom};
      a = a0; b = b0; c = c0; decrypt = 0; #1;
      a1 = a_n; b1 = b_n; c1 = c_n;
      a = b1; b = a1; c = c1; decrypt = 1; #1;   // swap A and B, decrypt
      expect3(b0, a0, c0, "inverse round");   // A and B come back swapped
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
