// data_out_reg_tb: the Data-Out register captures only when clocked by the controller and
// ITERATION READY is high for exactly the cycle after each capture.
module data_out_reg_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, capture = 0, ready, m_ready;
  logic [95:0] d, q, m_q;

  data_out_reg #(.W(96)) u_dut (.clk, .rst_n, .capture, .d, .q, .ready);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(negedge clk);
    checks++;
    if (ready !== 1'b0) begin failures++; $display("FAIL reset ready"); end
    rst_n = 1; m_ready = 0; m_q = '0;
    repeat (500) begin
      @(negedge clk);
      capture = $urandom % 2 == 0;
      d = {$urandom, $urandom, $urandom};
      m_ready = capture;
      if (capture) m_q = d;
      @(negedge clk);
      capture = 0;
      checks++;
      if (q !== m_q || ready !== m_ready) begin
        failures++; $display("FAIL q=%h ready=%b expected %h %b", q, ready, m_q, m_ready);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
