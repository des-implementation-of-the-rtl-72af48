// abc_regs: the three 32-bit data registers A, B and C with a 2-input multiplexer in front
// of each.
//
// When the controller's load select is high the registers take the initial-permuted Data-In
// block (A = bits 95:64, B = 63:32, C = 31:0); otherwise they take the round feedback.
// They change only on clock edges where the controller's enable is high. Reset clears them
// (reset behaviour is this design's choice).
module abc_regs
  import edes_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,       // register clock enable from the controller
  input  logic                ld_sel,   // 1: load block, 0: feedback
  input  logic [BLOCK_W-1:0]  blk_in,   // output of the initial permutation
  input  logic [SUB_W-1:0]    a_fb,
  input  logic [SUB_W-1:0]    b_fb,
  input  logic [SUB_W-1:0]    c_fb,
  output logic [SUB_W-1:0]    a,
  output logic [SUB_W-1:0]    b,
  output logic [SUB_W-1:0]    c
);
  logic [SUB_W-1:0] a_d, b_d, c_d;

  always_comb begin
    if (ld_sel) {a_d, b_d, c_d} = blk_in;
    else        {a_d, b_d, c_d} = {a_fb, b_fb, c_fb};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= '0;
      b <= '0;
      c <= '0;
    end else if (en) begin
      a <= a_d;
      b <= b_d;
      c <= c_d;
    end
  end
endmodule
