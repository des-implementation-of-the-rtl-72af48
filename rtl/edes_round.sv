// edes_round: the iteration hardware of the EDES datapath, one full round per clock.
//
// The B sub-block is expanded to 48 bits and XOR-ed with both round sub-keys: K1,i feeds
// S-boxes 1-8 (f1) and K2,i feeds S-boxes 9-16 (f2), each bank followed by the permutation P.
// Two 2-to-1 multiplexers route the bank outputs to the two 32-bit XOR arrays: when
// encrypting, f1 goes to the A side and f2 to the C side; when decrypting the banks are
// swapped. The round equations are
//   A_i = B_{i-1},  B_i = C_{i-1} ^ f_right(B_{i-1}),  C_i = A_{i-1} ^ f_left(B_{i-1}),
// which the document shows to be their own inverse once the key order is reversed and the
// banks are swapped. The S-box input order (DES bit 1..6 to S-box 1) follows the DES.
// Purely combinational; the A/B/C registers live in abc_regs.
module edes_round
  import edes_pkg::*;
(
  input  logic [SUB_W-1:0]    a,
  input  logic [SUB_W-1:0]    b,
  input  logic [SUB_W-1:0]    c,
  input  logic [SUBKEY_W-1:0] k1,       // sub-key for S-boxes 1-8
  input  logic [SUBKEY_W-1:0] k2,       // sub-key for S-boxes 9-16
  input  logic                decrypt,  // swap the bank outputs
  output logic [SUB_W-1:0]    a_next,
  output logic [SUB_W-1:0]    b_next,   // output of the right (C side) XOR array
  output logic [SUB_W-1:0]    c_next    // output of the left (A side) XOR array
);
  logic [SUBKEY_W-1:0] e, x1, x2;
  logic [SUB_W-1:0]    s1, s2, f1, f2, f_left, f_right;

  e_box u_ebox (.r(b), .e(e));

  assign x1 = e ^ k1;
  assign x2 = e ^ k2;

  for (genvar i = 0; i < 8; i++) begin : g_sbox
    sbox #(.INDEX(i + 1)) u_s_lo (.x(x1[SUBKEY_W-1-6*i -: 6]), .y(s1[SUB_W-1-4*i -: 4]));
    sbox #(.INDEX(i + 9)) u_s_hi (.x(x2[SUBKEY_W-1-6*i -: 6]), .y(s2[SUB_W-1-4*i -: 4]));
  end

  p_box u_p1 (.s(s1), .p(f1));
  p_box u_p2 (.s(s2), .p(f2));

  assign f_left  = decrypt ? f2 : f1;
  assign f_right = decrypt ? f1 : f2;

  assign a_next = b;
  assign b_next = c ^ f_right;
  assign c_next = a ^ f_left;
endmodule
