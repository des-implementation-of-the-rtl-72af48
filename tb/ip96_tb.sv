// ip96_tb: the 96-bit initial permutation against the reference built from its rule
// (bits 2,4,6,8 then 1,3,5,7 of each byte, last byte first), for walking ones and random
// blocks. It also checks two positions by hand: output bit 1 is input bit 90 (bit 2 of
// byte 12) and output bit 96 is input bit 7 (bit 7 of byte 1).
module ip96_tb;
  import edes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [95:0] d, q;

  ip96 u_dut (.d, .q);

  task automatic check(input logic [95:0] exp);
    #1;
    checks++;
    if (q !== exp) begin failures++; $display("FAIL IP(%h) = %h, expected %h", d, q, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 96'(1) << (96 - 90); check(96'(1) << 95);
    d = 96'(1) << (96 - 7);  check(96'(1));
    for (int i = 0; i < 96; i++) begin d = 96'(1) << i; check(ref_ip(d)); end
    repeat (200) begin d = {$urandom, $urandom, $urandom}; check(ref_ip(d)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
