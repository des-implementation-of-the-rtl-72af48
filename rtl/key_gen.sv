// key_gen: the key generation circuit. Two identical 56-bit circuits, one for K1 and one for
// K2, each made of a C half and a D half (key_shift_half) and a PC-2 box, deliver the two
// 48-bit round sub-keys K1,i and K2,i. The controller word chooses load / shift by one /
// shift by two and the clock enable; the mode chooses straight or reversed bit order. With
// the DES shift schedule the encryption sequence gives K1..K16 and the decryption sequence
// K16..K1 (see crypt_ctrl). Sub-keys change combinationally with the controller word.
module key_gen
  import edes_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  key_op_e              op,
  input  logic                 reverse,
  input  logic [HALFKEY_W-1:0] k1_cd,   // {C, D} of K1 from the key register
  input  logic [HALFKEY_W-1:0] k2_cd,   // {C, D} of K2
  output logic [SUBKEY_W-1:0]  k1_sub,  // K1,i
  output logic [SUBKEY_W-1:0]  k2_sub   // K2,i
);
  logic [CD_W-1:0] c1, d1, c2, d2;

  key_shift_half #(.W(CD_W)) u_c1 (.clk, .rst_n, .en, .op, .reverse, .key(k1_cd[HALFKEY_W-1 -: CD_W]), .sub(c1));
  key_shift_half #(.W(CD_W)) u_d1 (.clk, .rst_n, .en, .op, .reverse, .key(k1_cd[CD_W-1:0]),            .sub(d1));
  key_shift_half #(.W(CD_W)) u_c2 (.clk, .rst_n, .en, .op, .reverse, .key(k2_cd[HALFKEY_W-1 -: CD_W]), .sub(c2));
  key_shift_half #(.W(CD_W)) u_d2 (.clk, .rst_n, .en, .op, .reverse, .key(k2_cd[CD_W-1:0]),            .sub(d2));

  pc2_box u_pc2_1 (.cd({c1, d1}), .k(k1_sub));
  pc2_box u_pc2_2 (.cd({c2, d2}), .k(k2_sub));
endmodule
