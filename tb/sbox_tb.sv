// sbox_tb: exhaustive test of all sixteen S-box instances. Every 6-bit input of every
// S-box is compared with a row/column look-up of the DES table (S-box n and n+8 use DES
// table n), plus the textbook example S1(011011) = 5.
module sbox_tb;
  import edes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] x;
  logic [3:0] y [16];

  for (genvar n = 0; n < 16; n++) begin : g_dut
    sbox #(.INDEX(n + 1)) u_dut (.x(x), .y(y[n]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      x = 6'(v);
      #1;
      for (int n = 0; n < 16; n++) begin
        checks++;
        if (y[n] !== ref_s(n % 8, x)) begin
          failures++;
          $display("FAIL S%0d(%b) = %0d, expected %0d", n + 1, x, y[n], ref_s(n % 8, x));
        end
      end
    end
    x = 6'b011011;
    #1;
    checks++;
    if (y[0] !== 4'd5) begin failures++; $display("FAIL S1(011011) = %0d", y[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
