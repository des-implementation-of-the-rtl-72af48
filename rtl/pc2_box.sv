// pc2_box: permuted choice 2, selecting and ordering 48 of the 56 bits of one rotated key
// half pair {C, D} to form a round sub-key. It is the DES PC-2, used once for K1 and once
// for K2. Wiring only; combinational.
module pc2_box
  import edes_pkg::*;
(
  input  logic [HALFKEY_W-1:0] cd,
  output logic [SUBKEY_W-1:0]  k
);
  always_comb begin
    for (int j = 1; j <= int'(SUBKEY_W); j++)
      k[SUBKEY_W - j] = cd[HALFKEY_W - PC2_TAB[j-1]];
  end
endmodule
