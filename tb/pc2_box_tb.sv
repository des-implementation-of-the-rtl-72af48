// pc2_box_tb: PC-2 against a table look-up for walking-one and random inputs, plus the DES
// example where C1D1 of key 133457799BBCDFF1 gives the sub-key 1B02EFFC7072.
module pc2_box_tb;
  import edes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [55:0] cd;
  logic [47:0] k;

  pc2_box u_dut (.cd, .k);

  task automatic check(input logic [47:0] exp);
    #1;
    checks++;
    if (k !== exp) begin failures++; $display("FAIL PC2(%h) = %h, expected %h", cd, k, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cd = {28'b1110000110011001010101011111, 28'b1010101011001100111100011110};
    check(48'h1B02EFFC7072);
    for (int i = 0; i < 56; i++) begin cd = 56'(1) << i; check(ref_pc2(cd)); end
    repeat (200) begin cd = {$urandom, $urandom}; check(ref_pc2(cd)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
