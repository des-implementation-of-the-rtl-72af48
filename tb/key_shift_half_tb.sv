// key_shift_half_tb: the 28-bit key-shift half against a rotating reference. Random sequences
// of load / shift-by-one / shift-by-two, with the clock enable toggling, in straight mode
// (left rotations) and in reverse mode (which must act as right rotations of the key).
module key_shift_half_tb;
  import edes_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, reverse = 0;
  key_op_e op;
  logic [27:0] key, sub, model;   // model: current rotation of the key

  key_shift_half #(.W(28)) u_dut (.clk, .rst_n, .en, .op, .reverse, .key, .sub);

  always #5 clk = ~clk;

  function automatic logic [27:0] rot(input logic [27:0] v, input int n, input logic right);
    logic [27:0] o;
    o = v;
    repeat (n) o = right ? {o[0], o[27:1]} : {o[26:0], o[27]};
    return o;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = KEY_LOAD; key = 28'h0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      @(negedge clk);
      reverse = trial[0];
      key = 28'($urandom);
      op = KEY_LOAD; en = 1;
      #1;
      checks++;
      if (sub !== key) begin failures++; $display("FAIL load view %h vs %h", sub, key); end
      model = key;
      repeat (30) begin
        int n;
        @(negedge clk);
        n = 1 + ($urandom % 2);
        op = (n == 1) ? KEY_SHIFT1 : KEY_SHIFT2;
        en = ($urandom % 4) != 0;
        #1;
        checks++;
        if (sub !== rot(model, n, reverse)) begin
          failures++;
          $display("FAIL rev=%0d n=%0d got %h expected %h", reverse, n, sub, rot(model, n, reverse));
        end
        if (en) model = rot(model, n, reverse);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
