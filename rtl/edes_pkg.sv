// edes_pkg: constants, tables and types shared by the EDES (Extended DES) datapath and
// controllers.
//
// Bit numbering: every vector is declared [N-1:0] and bit number k of the classic DES
// tables (counted from 1 at the left) is vector bit N-k, so DES bit 1 is the MSB. The A, B
// and C sub-blocks of a 96-bit block are bits [95:64], [63:32] and [31:0].
//
// The expansion box E, the permutation P, PC-1, PC-2, the shift schedule and the eight
// S-box tables are those of the DES standard: the EDES keeps "the same P, E and S-boxes".
// The 96-bit initial permutation is this design's own generalisation of the DES IP to
// twelve input bytes (see ip96_src). The tables here are the standard published ones;
// S-boxes 9 to 16 reuse the tables of S-boxes 1 to 8 (a choice of this design, since their
// contents are not published with the hardware).
package edes_pkg;

  localparam int unsigned BLOCK_W  = 96;   // data block
  localparam int unsigned SUB_W    = 32;   // one of the sub-blocks A, B, C
  localparam int unsigned KEY_W    = 128;  // key with parity bits
  localparam int unsigned HALFKEY_W = 56;  // K1 or K2 after parity removal
  localparam int unsigned CD_W     = 28;   // one shift half
  localparam int unsigned SUBKEY_W = 48;   // round sub-key
  localparam int unsigned ROUNDS   = 16;
  localparam int unsigned CTRL_W   = 7;    // controller ROM word width
  localparam int unsigned ENC_WORDS = 17;  // encryption ROM depth
  localparam int unsigned DEC_WORDS = 16;  // decryption ROM depth

  // Operations of the 3-to-1 multiplexer in front of each key-shift register bit.
  typedef enum logic [1:0] {
    KEY_LOAD   = 2'd0,
    KEY_SHIFT1 = 2'd1,
    KEY_SHIFT2 = 2'd2
  } key_op_e;

  // One 7-bit controller ROM word.
  typedef struct packed {
    logic    ld_sel;   // A/B/C multiplexers take the permuted Data-In block
    key_op_e key_op;   // key-shift multiplexer selection
    logic    key_clk;  // clock enable of the key-shift register set
    logic    abc_clk;  // clock enable of the A/B/C registers
    logic    out_clk;  // clock enable of the Data-Out register
    logic    last;     // last word of the sequence
  } ctrl_word_t;

  // Left-rotation amount applied before round i (DES key schedule), i = 1..16.
  localparam int SHIFTS [ROUNDS] = '{1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1};

  localparam int P_TAB [32] = '{
    16,  7, 20, 21, 29, 12, 28, 17,
     1, 15, 23, 26,  5, 18, 31, 10,
     2,  8, 24, 14, 32, 27,  3,  9,
    19, 13, 30,  6, 22, 11,  4, 25};

  localparam int PC1_TAB [56] = '{
    57, 49, 41, 33, 25, 17,  9,
     1, 58, 50, 42, 34, 26, 18,
    10,  2, 59, 51, 43, 35, 27,
    19, 11,  3, 60, 52, 44, 36,
    63, 55, 47, 39, 31, 23, 15,
     7, 62, 54, 46, 38, 30, 22,
    14,  6, 61, 53, 45, 37, 29,
    21, 13,  5, 28, 20, 12,  4};

  localparam int PC2_TAB [48] = '{
    14, 17, 11, 24,  1,  5,
     3, 28, 15,  6, 21, 10,
    23, 19, 12,  4, 26,  8,
    16,  7, 27, 20, 13,  2,
    41, 52, 31, 37, 47, 55,
    30, 40, 51, 45, 33, 48,
    44, 49, 39, 56, 34, 53,
    46, 42, 50, 36, 29, 32};

  // S_TAB[box][row*16 + column], box 0..7 = DES S1..S8.
  localparam logic [3:0] S_TAB [8][64] = '{
    '{4'd14, 4'd4, 4'd13, 4'd1, 4'd2, 4'd15, 4'd11, 4'd8, 4'd3, 4'd10, 4'd6, 4'd12, 4'd5, 4'd9, 4'd0, 4'd7,
      4'd0, 4'd15, 4'd7, 4'd4, 4'd14, 4'd2, 4'd13, 4'd1, 4'd10, 4'd6, 4'd12, 4'd11, 4'd9, 4'd5, 4'd3, 4'd8,
      4'd4, 4'd1, 4'd14, 4'd8, 4'd13, 4'd6, 4'd2, 4'd11, 4'd15, 4'd12, 4'd9, 4'd7, 4'd3, 4'd10, 4'd5, 4'd0,
      4'd15, 4'd12, 4'd8, 4'd2, 4'd4, 4'd9, 4'd1, 4'd7, 4'd5, 4'd11, 4'd3, 4'd14, 4'd10, 4'd0, 4'd6, 4'd13},
    '{4'd15, 4'd1, 4'd8, 4'd14, 4'd6, 4'd11, 4'd3, 4'd4, 4'd9, 4'd7, 4'd2, 4'd13, 4'd12, 4'd0, 4'd5, 4'd10,
      4'd3, 4'd13, 4'd4, 4'd7, 4'd15, 4'd2, 4'd8, 4'd14, 4'd12, 4'd0, 4'd1, 4'd10, 4'd6, 4'd9, 4'd11, 4'd5,
      4'd0, 4'd14, 4'd7, 4'd11, 4'd10, 4'd4, 4'd13, 4'd1, 4'd5, 4'd8, 4'd12, 4'd6, 4'd9, 4'd3, 4'd2, 4'd15,
      4'd13, 4'd8, 4'd10, 4'd1, 4'd3, 4'd15, 4'd4, 4'd2, 4'd11, 4'd6, 4'd7, 4'd12, 4'd0, 4'd5, 4'd14, 4'd9},
    '{4'd10, 4'd0, 4'd9, 4'd14, 4'd6, 4'd3, 4'd15, 4'd5, 4'd1, 4'd13, 4'd12, 4'd7, 4'd11, 4'd4, 4'd2, 4'd8,
      4'd13, 4'd7, 4'd0, 4'd9, 4'd3, 4'd4, 4'd6, 4'd10, 4'd2, 4'd8, 4'd5, 4'd14, 4'd12, 4'd11, 4'd15, 4'd1,
      4'd13, 4'd6, 4'd4, 4'd9, 4'd8, 4'd15, 4'd3, 4'd0, 4'd11, 4'd1, 4'd2, 4'd12, 4'd5, 4'd10, 4'd14, 4'd7,
      4'd1, 4'd10, 4'd13, 4'd0, 4'd6, 4'd9, 4'd8, 4'd7, 4'd4, 4'd15, 4'd14, 4'd3, 4'd11, 4'd5, 4'd2, 4'd12},
    '{4'd7, 4'd13, 4'd14, 4'd3, 4'd0, 4'd6, 4'd9, 4'd10, 4'd1, 4'd2, 4'd8, 4'd5, 4'd11, 4'd12, 4'd4, 4'd15,
      4'd13, 4'd8, 4'd11, 4'd5, 4'd6, 4'd15, 4'd0, 4'd3, 4'd4, 4'd7, 4'd2, 4'd12, 4'd1, 4'd10, 4'd14, 4'd9,
      4'd10, 4'd6, 4'd9, 4'd0, 4'd12, 4'd11, 4'd7, 4'd13, 4'd15, 4'd1, 4'd3, 4'd14, 4'd5, 4'd2, 4'd8, 4'd4,
      4'd3, 4'd15, 4'd0, 4'd6, 4'd10, 4'd1, 4'd13, 4'd8, 4'd9, 4'd4, 4'd5, 4'd11, 4'd12, 4'd7, 4'd2, 4'd14},
    '{4'd2, 4'd12, 4'd4, 4'd1, 4'd7, 4'd10, 4'd11, 4'd6, 4'd8, 4'd5, 4'd3, 4'd15, 4'd13, 4'd0, 4'd14, 4'd9,
      4'd14, 4'd11, 4'd2, 4'd12, 4'd4, 4'd7, 4'd13, 4'd1, 4'd5, 4'd0, 4'd15, 4'd10, 4'd3, 4'd9, 4'd8, 4'd6,
      4'd4, 4'd2, 4'd1, 4'd11, 4'd10, 4'd13, 4'd7, 4'd8, 4'd15, 4'd9, 4'd12, 4'd5, 4'd6, 4'd3, 4'd0, 4'd14,
      4'd11, 4'd8, 4'd12, 4'd7, 4'd1, 4'd14, 4'd2, 4'd13, 4'd6, 4'd15, 4'd0, 4'd9, 4'd10, 4'd4, 4'd5, 4'd3},
    '{4'd12, 4'd1, 4'd10, 4'd15, 4'd9, 4'd2, 4'd6, 4'd8, 4'd0, 4'd13, 4'd3, 4'd4, 4'd14, 4'd7, 4'd5, 4'd11,
      4'd10, 4'd15, 4'd4, 4'd2, 4'd7, 4'd12, 4'd9, 4'd5, 4'd6, 4'd1, 4'd13, 4'd14, 4'd0, 4'd11, 4'd3, 4'd8,
      4'd9, 4'd14, 4'd15, 4'd5, 4'd2, 4'd8, 4'd12, 4'd3, 4'd7, 4'd0, 4'd4, 4'd10, 4'd1, 4'd13, 4'd11, 4'd6,
      4'd4, 4'd3, 4'd2, 4'd12, 4'd9, 4'd5, 4'd15, 4'd10, 4'd11, 4'd14, 4'd1, 4'd7, 4'd6, 4'd0, 4'd8, 4'd13},
    '{4'd4, 4'd11, 4'd2, 4'd14, 4'd15, 4'd0, 4'd8, 4'd13, 4'd3, 4'd12, 4'd9, 4'd7, 4'd5, 4'd10, 4'd6, 4'd1,
      4'd13, 4'd0, 4'd11, 4'd7, 4'd4, 4'd9, 4'd1, 4'd10, 4'd14, 4'd3, 4'd5, 4'd12, 4'd2, 4'd15, 4'd8, 4'd6,
      4'd1, 4'd4, 4'd11, 4'd13, 4'd12, 4'd3, 4'd7, 4'd14, 4'd10, 4'd15, 4'd6, 4'd8, 4'd0, 4'd5, 4'd9, 4'd2,
      4'd6, 4'd11, 4'd13, 4'd8, 4'd1, 4'd4, 4'd10, 4'd7, 4'd9, 4'd5, 4'd0, 4'd15, 4'd14, 4'd2, 4'd3, 4'd12},
    '{4'd13, 4'd2, 4'd8, 4'd4, 4'd6, 4'd15, 4'd11, 4'd1, 4'd10, 4'd9, 4'd3, 4'd14, 4'd5, 4'd0, 4'd12, 4'd7,
      4'd1, 4'd15, 4'd13, 4'd8, 4'd10, 4'd3, 4'd7, 4'd4, 4'd12, 4'd5, 4'd6, 4'd11, 4'd0, 4'd14, 4'd9, 4'd2,
      4'd7, 4'd11, 4'd4, 4'd1, 4'd9, 4'd12, 4'd14, 4'd2, 4'd0, 4'd6, 4'd10, 4'd13, 4'd15, 4'd3, 4'd5, 4'd8,
      4'd2, 4'd1, 4'd14, 4'd7, 4'd4, 4'd10, 4'd8, 4'd13, 4'd15, 4'd12, 4'd9, 4'd0, 4'd3, 4'd5, 4'd6, 4'd11}};

  // Source bit (DES numbering, 1..32) of expansion output bit j (1..48): output group g takes
  // input bits 4g .. 4g+5, wrapping around the 32-bit word.
  function automatic int e_src(input int j);
    int g, k;
    g = (j - 1) / 6;
    k = (j - 1) % 6;
    return ((4 * g + k + 31) % 32) + 1;
  endfunction

  // Source bit (1..96) of initial-permutation output bit j (1..96). The block is read as
  // twelve bytes; the output gathers bit 2, 4, 6, 8, then 1, 3, 5, 7 of every byte, last
  // byte first. With eight bytes this formula is exactly the DES IP.
  function automatic int ip96_src(input int j);
    int nbytes, grp, pos, byte_i;
    nbytes = BLOCK_W / 8;
    grp    = (j - 1) / nbytes;                  // 0..7
    byte_i = nbytes - 1 - ((j - 1) % nbytes);   // last byte first
    pos    = (grp < 4) ? 2 * grp + 2 : 2 * (grp - 4) + 1;
    return byte_i * 8 + pos;
  endfunction

  // Row/column lookup of DES S-box table 'box' (0..7) for a 6-bit input x1..x6 (x1 = MSB):
  // x1 and x6 select the row, x2..x5 the column.
  function automatic logic [3:0] s_lookup(input int box, input logic [5:0] x);
    return S_TAB[box][{x[5], x[0], x[4:1]}];
  endfunction

endpackage
