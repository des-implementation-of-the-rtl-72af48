// e_box: expansion permutation of the B sub-block, 32 -> 48 bits.
//
// Output group g (six bits) copies input bits 4g..4g+5 in DES numbering, wrapping around, so
// the two edge bits of every nibble are duplicated. This is the DES expansion, which the
// EDES keeps unchanged. In silicon it is pure wiring; here it is combinational.
module e_box
  import edes_pkg::*;
(
  input  logic [SUB_W-1:0]    r,
  output logic [SUBKEY_W-1:0] e
);
  always_comb begin
    for (int j = 1; j <= int'(SUBKEY_W); j++)
      e[SUBKEY_W - j] = r[SUB_W - e_src(j)];
  end
endmodule
