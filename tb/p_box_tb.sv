// p_box_tb: the permutation P for walking-one and random inputs against a table look-up,
// plus the DES example P(5C82B597) = 234AA9BB.
module p_box_tb;
  import edes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] s, p;

  p_box u_dut (.s, .p);

  task automatic check(input logic [31:0] exp);
    #1;
    checks++;
    if (p !== exp) begin failures++; $display("FAIL P(%h) = %h, expected %h", s, p, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 32'h5C82B597; check(32'h234AA9BB);
    for (int i = 0; i < 32; i++) begin s = 32'(1) << i; check(ref_p(s)); end
    repeat (200) begin s = $urandom; check(ref_p(s)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
