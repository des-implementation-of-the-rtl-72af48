// ip96_inv: final permutation (IP^-1) of the 96-bit EDES block, in front of the Data-Out
// register. It undoes ip96: input bit j goes back to position ip96_src(j). The table is this
// design's own generalisation of the DES IP (see ip96). Combinational.
module ip96_inv
  import edes_pkg::*;
(
  input  logic [BLOCK_W-1:0] d,
  output logic [BLOCK_W-1:0] q
);
  always_comb begin
    for (int j = 1; j <= int'(BLOCK_W); j++)
      q[BLOCK_W - ip96_src(j)] = d[BLOCK_W - j];
  end
endmodule
