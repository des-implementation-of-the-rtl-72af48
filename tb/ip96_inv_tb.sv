// ip96_inv_tb: the final permutation must undo the initial permutation. Random and
// walking-one blocks are permuted by the reference IP and must come back unchanged.
module ip96_inv_tb;
  import edes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [95:0] x, d, q;

  ip96_inv u_dut (.d, .q);

  task automatic check();
    d = ref_ip(x);
    #1;
    checks++;
    if (q !== x) begin failures++; $display("FAIL IP^-1(IP(%h)) = %h", x, q); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 96; i++) begin x = 96'(1) << i; check(); end
    repeat (200) begin x = {$urandom, $urandom, $urandom}; check(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
