// e_box_tb: the expansion box against the spelled-out DES E table for walking-one inputs
// and random words, plus the DES example E(F0AAF0AA) = 7A15557A1555.
module e_box_tb;
  import edes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] r;
  logic [47:0] e;

  e_box u_dut (.r, .e);

  task automatic check(input logic [47:0] exp);
    #1;
    checks++;
    if (e !== exp) begin failures++; $display("FAIL E(%h) = %h, expected %h", r, e, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = 32'hF0AAF0AA; check(48'h7A15557A1555);
    for (int i = 0; i < 32; i++) begin r = 32'(1) << i; check(ref_e(r)); end
    repeat (200) begin r = $urandom; check(ref_e(r)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
