// edes_top: EDES (Extended DES) encryption/decryption unit, 96-bit blocks, 112-bit key
// (128 bits with parity), 16 rounds on one round of hardware.
//
// Data path: Data-In register -> 96-bit initial permutation -> A/B/C registers (loaded
// through their 2-input multiplexers) -> edes_round, whose A/B/C results feed back into the
// registers once per clock. In the cycle of round 16 the Data-Out register captures
// {right XOR array, B register, left XOR array} = {B16, A16, C16} through the final
// permutation, which is the interchange of A16 and B16 that ends the algorithm.
// Key path: LOAD KEY stores both keys after parity removal and PC-1 in the key register;
// key_gen derives K1,i and K2,i each round. Control: crypt_ctrl steps the encryption or
// decryption ROM; sys_ctrl launches blocks on START and handles the status signals.
//
// Timing: a block started from idle takes 17 clock cycles (one load word, 16 rounds). With
// the Data-In register refilled in time, a chained block is loaded in the round-16 cycle of
// the one before it and needs 16 cycles, 96 bits per 16 cycles = 90 Mbit/s at the
// document's 15 MHz (see sys_ctrl for when chaining is allowed). ITERATION READY pulses for
// one cycle after each result is captured.
// Decryption uses the same hardware with reversed key order and swapped S-box banks.
// The block structure follows the document; port widths and handshakes are this design's.
module edes_top
  import edes_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [BLOCK_W-1:0] data_in,
  input  logic               load_data,        // write data_in into the Data-In register
  input  logic [KEY_W-1:0]   key_in,           // {K1, K2}, 64 bits each with parity
  input  logic               load_key,         // LOAD KEY
  input  logic               start,            // START (level)
  input  logic               encrypt,          // ENCRYPT/DECRYPT, 1 = encrypt
  output logic               input_reg_empty,  // INPUT REGISTER EMPTY
  output logic               iteration_ready,  // ITERATION READY
  output logic               key_reg_full,     // Key Register Full
  output logic               key_error,        // Key Error (byte parity)
  output logic               busy,
  output logic [BLOCK_W-1:0] data_out
);
  ctrl_word_t           ctrl;
  logic                 launch, chain, decrypt, din_full, last, abc_ld;
  logic [BLOCK_W-1:0]   din_q, ip_out, fp_in, fp_out;
  logic [SUB_W-1:0]     a, b, c, a_nx, b_nx, c_nx;
  logic [HALFKEY_W-1:0] k1_cd, k2_cd;
  logic [SUBKEY_W-1:0]  k1_sub, k2_sub;

  assign last = ctrl.last;
  // A/B/C load select: the load word, or a chained launch in the last word of a block.
  assign abc_ld = ctrl.ld_sel || chain;

  data_in_reg #(.W(BLOCK_W)) u_din (
    .clk, .rst_n, .load(load_data), .d(data_in), .take(abc_ld && ctrl.abc_clk),
    .q(din_q), .full(din_full), .empty(input_reg_empty));

  ip96 u_ip (.d(din_q), .q(ip_out));

  abc_regs u_abc (
    .clk, .rst_n, .en(ctrl.abc_clk), .ld_sel(abc_ld), .blk_in(ip_out),
    .a_fb(a_nx), .b_fb(b_nx), .c_fb(c_nx), .a, .b, .c);

  key_register u_keyreg (
    .clk, .rst_n, .load_key, .key_in, .k1_cd, .k2_cd, .full(key_reg_full));

  key_parity_check u_parity (.clk, .rst_n, .load_key, .key_in, .key_error);

  key_gen u_keygen (
    .clk, .rst_n, .en(ctrl.key_clk), .op(ctrl.key_op), .reverse(decrypt),
    .k1_cd, .k2_cd, .k1_sub, .k2_sub);

  edes_round u_round (
    .a, .b, .c, .k1(k1_sub), .k2(k2_sub), .decrypt,
    .a_next(a_nx), .b_next(b_nx), .c_next(c_nx));

  assign fp_in = {b_nx, b, c_nx};

  ip96_inv u_fp (.d(fp_in), .q(fp_out));

  data_out_reg #(.W(BLOCK_W)) u_dout (
    .clk, .rst_n, .capture(ctrl.out_clk), .d(fp_out),
    .q(data_out), .ready(iteration_ready));

  crypt_ctrl u_ctrl (.clk, .rst_n, .launch, .chain, .decrypt, .ctrl, .busy, .count());

  sys_ctrl u_sys (
    .clk, .rst_n, .start, .encrypt, .load_key, .key_full(key_reg_full), .din_full,
    .busy, .last, .launch, .chain, .decrypt);
endmodule
