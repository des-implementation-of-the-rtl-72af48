// abc_regs_tb: the A/B/C registers with their input multiplexers. Random cycles of load,
// feedback and hold are compared with a model; reset must clear all three registers.
module abc_regs_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, ld_sel = 0;
  logic [95:0] blk_in, model;
  logic [31:0] a_fb, b_fb, c_fb, a, b, c;

  abc_regs u_dut (.clk, .rst_n, .en, .ld_sel, .blk_in, .a_fb, .b_fb, .c_fb, .a, .b, .c);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_in = '0; a_fb = '0; b_fb = '0; c_fb = '0;
    @(negedge clk);
    checks++;
    if ({a, b, c} !== 96'h0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    model = '0;
    repeat (500) begin
      @(negedge clk);
      en = $urandom % 4 != 0; ld_sel = $urandom % 3 == 0;
      blk_in = {$urandom, $urandom, $urandom};
      a_fb = $urandom; b_fb = $urandom; c_fb = $urandom;
      if (en) model = ld_sel ? blk_in : {a_fb, b_fb, c_fb};
      @(negedge clk);
      en = 0;
      checks++;
      if ({a, b, c} !== model) begin failures++; $display("FAIL got %h expected %h", {a, b, c}, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
