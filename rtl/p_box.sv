// p_box: the 32-bit permutation P applied to the output of a bank of eight S-boxes.
//
// Output bit j (DES numbering) is input bit P_TAB[j], the DES permutation, which the EDES
// keeps. Wiring only; combinational.
module p_box
  import edes_pkg::*;
(
  input  logic [SUB_W-1:0] s,
  output logic [SUB_W-1:0] p
);
  always_comb begin
    for (int j = 1; j <= int'(SUB_W); j++)
      p[SUB_W - j] = s[SUB_W - P_TAB[j-1]];
  end
endmodule
