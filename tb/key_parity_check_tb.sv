// key_parity_check_tb: Key Error must stay low for keys with odd parity in every byte
// (including the DES example key), rise when any single bit of such a key is flipped, and
// change only on LOAD KEY.
module key_parity_check_tb;
  import edes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load_key = 0, key_error;
  logic [127:0] key_in;

  key_parity_check u_dut (.clk, .rst_n, .load_key, .key_in, .key_error);

  always #5 clk = ~clk;

  task automatic load_and_check(input logic [127:0] k, input logic exp);
    @(negedge clk);
    key_in = k; load_key = 1;
    @(negedge clk);
    load_key = 0;
    checks++;
    if (key_error !== exp) begin failures++; $display("FAIL key %h error=%b expected %b", k, key_error, exp); end
    key_in = ~k;   // must not matter without LOAD KEY
    @(negedge clk);
    checks++;
    if (key_error !== exp) begin failures++; $display("FAIL key error changed without load"); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_in = '0;
    @(negedge clk);
    rst_n = 1;
    load_and_check({64'h133457799BBCDFF1, 64'h133457799BBCDFF1}, 1'b0);
    repeat (60) begin
      logic [127:0] k;
      k = odd_parity({$urandom, $urandom, $urandom, $urandom});
      load_and_check(k, 1'b0);
      load_and_check(k ^ (128'(1) << ($urandom % 128)), 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
