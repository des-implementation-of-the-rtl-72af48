// key_shift_half: one 28-bit half (C or D) of the key-shift register set.
//
// Each bit has a 3-to-1 multiplexer in front of its register: load the key half, take the
// neighbour one place to the right (rotate left by one) or two places to the right (rotate
// left by two). A row of straight/reverse 2-to-1 multiplexers sits between the key register
// and the load input, and a second row after the shift path. In decryption both rows
// reverse the bit order, so the same left rotations act as right rotations on the key and
// the sub-keys come out in reverse order. This structure follows the document.
//
// Timing (this design's choice): the half's output is taken at the 3-to-1 multiplexer, i.e.
// it is the value the register holds after the current clock edge. A round therefore uses
// the rotation selected by the same controller word, and the register then keeps it for the
// next word. The register changes only when 'en' is high.
module key_shift_half
  import edes_pkg::*;
#(
  parameter int unsigned W = 28
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,        // register clock enable
  input  key_op_e      op,        // load / shift by one / shift by two
  input  logic         reverse,   // decryption: reverse the bit order in and out
  input  logic [W-1:0] key,       // key half from the key register
  output logic [W-1:0] sub        // rotated key half for PC-2
);
  logic [W-1:0] sr, key_row, mux_out;

  function automatic logic [W-1:0] bitrev(input logic [W-1:0] v);
    logic [W-1:0] r;
    for (int i = 0; i < int'(W); i++) r[i] = v[W-1-i];
    return r;
  endfunction

  assign key_row = reverse ? bitrev(key) : key;

  always_comb begin
    unique case (op)
      KEY_SHIFT1: mux_out = {sr[W-2:0], sr[W-1]};
      KEY_SHIFT2: mux_out = {sr[W-3:0], sr[W-1:W-2]};
      default:    mux_out = key_row;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sr <= '0;
    else if (en) sr <= mux_out;
  end

  assign sub = reverse ? bitrev(mux_out) : mux_out;
endmodule
