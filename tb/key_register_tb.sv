// key_register_tb: LOAD KEY stores PC-1 of both 64-bit keys. The DES example key
// 133457799BBCDFF1 must give C0 = F0CCAAF, D0 = 556678F; random keys are compared with the
// reference PC-1. Key Register Full must be low after reset and high after a load, and the
// register must hold its value while LOAD KEY is low.
module key_register_tb;
  import edes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load_key = 0, full;
  logic [127:0] key_in;
  logic [55:0]  k1_cd, k2_cd;

  key_register u_dut (.clk, .rst_n, .load_key, .key_in, .k1_cd, .k2_cd, .full);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(full === 1'b0, "full after reset");
    key_in = {64'h133457799BBCDFF1, 64'h0E329232EA6D0D73};
    load_key = 1;
    @(negedge clk);
    load_key = 0;
    check(full === 1'b1, "full after load");
    check(k1_cd === {28'hF0CCAAF, 28'h556678F}, "DES example PC-1");
    check(k2_cd === ref_pc1(64'h0E329232EA6D0D73), "K2 PC-1");
    repeat (50) begin
      logic [127:0] old;
      old = key_in;
      key_in = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      check(k1_cd === ref_pc1(old[127:64]) && k2_cd === ref_pc1(old[63:0]), "hold without load");
      load_key = 1;
      @(negedge clk);
      load_key = 0;
      check(k1_cd === ref_pc1(key_in[127:64]) && k2_cd === ref_pc1(key_in[63:0]), "random load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
