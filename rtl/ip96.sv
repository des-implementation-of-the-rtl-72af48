// ip96: initial permutation of the 96-bit EDES block, between the Data-In register and the
// A/B/C register multiplexers.
//
// The document extends the DES IP to 96 bits without giving the table. This design uses the
// regular structure of the DES IP applied to twelve bytes: the output first collects bit 2
// of every byte (last byte first), then bits 4, 6, 8, then bits 1, 3, 5, 7 (see
// edes_pkg::ip96_src). With eight bytes this reproduces the DES IP exactly. Combinational.
module ip96
  import edes_pkg::*;
(
  input  logic [BLOCK_W-1:0] d,
  output logic [BLOCK_W-1:0] q
);
  always_comb begin
    for (int j = 1; j <= int'(BLOCK_W); j++)
      q[BLOCK_W - j] = d[BLOCK_W - ip96_src(j)];
  end
endmodule
