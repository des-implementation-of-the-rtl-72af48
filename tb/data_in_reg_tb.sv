// data_in_reg_tb: the Data-In register and INPUT REGISTER EMPTY. Random write/take cycles
// against a model: a write stores the block and marks it full, a take alone empties it, a
// write together with a take stays full.
module data_in_reg_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, take = 0, full, empty, m_full;
  logic [95:0] d, q, m_q;

  data_in_reg #(.W(96)) u_dut (.clk, .rst_n, .load, .d, .take, .q, .full, .empty);

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
    if (full !== 1'b0 || empty !== 1'b1) begin failures++; $display("FAIL reset flags"); end
    rst_n = 1; m_full = 0; m_q = '0;
    repeat (500) begin
      @(negedge clk);
      load = $urandom % 3 == 0; take = $urandom % 3 == 0;
      d = {$urandom, $urandom, $urandom};
      if (load) begin m_q = d; m_full = 1; end
      else if (take) m_full = 0;
      @(negedge clk);
      load = 0; take = 0;
      checks++;
      if (q !== m_q || full !== m_full || empty !== !m_full) begin
        failures++; $display("FAIL q=%h full=%b expected %h %b", q, full, m_q, m_full);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
