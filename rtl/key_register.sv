// key_register: parity-bit removal, permuted choice 1 and the 112-bit key register.
//
// The 128-bit input key holds two 64-bit DES-style keys, K1 in bits 127:64 and K2 in 63:0,
// each with a parity bit in every byte. PC-1 (the DES table) drops the eight parity bits of
// each key and orders the remaining 56 bits as {C, D}, 28 bits each. LOAD KEY stores both
// results and raises Key Register Full, which stays high until reset. The K1/K2 split of the
// input and the use of the DES PC-1 follow the document; the placement of PC-1 in front of
// the register and the reset behaviour are this design's choices.
module key_register
  import edes_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load_key,
  input  logic [KEY_W-1:0]     key_in,
  output logic [HALFKEY_W-1:0] k1_cd,
  output logic [HALFKEY_W-1:0] k2_cd,
  output logic                 full
);
  function automatic logic [HALFKEY_W-1:0] pc1(input logic [63:0] k);
    logic [HALFKEY_W-1:0] r;
    for (int j = 1; j <= int'(HALFKEY_W); j++)
      r[HALFKEY_W - j] = k[64 - PC1_TAB[j-1]];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k1_cd <= '0;
      k2_cd <= '0;
      full  <= 1'b0;
    end else if (load_key) begin
      k1_cd <= pc1(key_in[127:64]);
      k2_cd <= pc1(key_in[63:0]);
      full  <= 1'b1;
    end
  end
endmodule
