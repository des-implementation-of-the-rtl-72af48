// crypt_ctrl: the encryption and decryption controllers, built as ROMs stepped by a 5-bit
// word counter, with a multiplexer choosing between the two ROM outputs.
//
// Each 7-bit word (edes_pkg::ctrl_word_t) drives the A/B/C load multiplexers, the key-shift
// 3-to-1 multiplexers, the clock enables of the key-shift and A/B/C registers, the clock of
// the Data-Out register and an end-of-sequence bit.
//   Encryption ROM, 17 words: word 0 loads the A/B/C registers from the Data-In register and
//   the key-shift registers from the key register; words 1..16 run rounds 1..16, each with
//   the DES left shift of that round (1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1), word 16 also clocks
//   the Data-Out register.
//   Decryption ROM, 16 words (rounds 16..1): the first reloads the key (rotation 0 = K16),
//   the others apply the shift schedule backwards; the last clocks the Data-Out register.
// The load word is the same in both modes, so it is read from the encryption ROM in either
// mode; only counter values 1..16 read the decryption ROM when decrypting. ROM depths and
// word width follow the document; the word layout and this sharing are this design's
// reading. A block takes 17 clock cycles from the load word to the Data-Out clock.
// Both ROMs are addressed through one two-stage word-line decoder, built like the S-box
// decoders: 5 inverters, two 2-to-4 predecoders (8 two-input ANDs) and 17 three-input ANDs
// for the 17 word lines (decryption uses lines 1..16). These are the counts of the
// document's controller cell list.
// 'launch' starts a sequence when the counter is idle or on its last word (back to back).
// With 'chain' the new sequence starts at word 1: the load word is skipped because the A/B/C
// registers take the next block in the last word of the running one (see sys_ctrl). A
// chained stream therefore takes 16 cycles per block.
module crypt_ctrl
  import edes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       launch,
  input  logic       chain,
  input  logic       decrypt,
  output ctrl_word_t ctrl,
  output logic       busy,
  output logic [4:0] count
);
  function automatic key_op_e shift_op(input int n);
    return (n == 2) ? KEY_SHIFT2 : KEY_SHIFT1;
  endfunction

  // Encryption ROM contents, word w = 0..16.
  function automatic ctrl_word_t enc_rom(input int w);
    ctrl_word_t r;
    if (w == 0)
      r = '{ld_sel: 1'b1, key_op: KEY_LOAD, key_clk: 1'b1, abc_clk: 1'b1, out_clk: 1'b0, last: 1'b0};
    else
      r = '{ld_sel: 1'b0, key_op: shift_op(SHIFTS[w-1]), key_clk: 1'b1, abc_clk: 1'b1,
            out_clk: (w == 16), last: (w == 16)};
    return r;
  endfunction

  // Decryption ROM contents, entry d = 0..15, read at counter value d+1 (round 16-d).
  function automatic ctrl_word_t dec_rom(input int d);
    ctrl_word_t r;
    int w;
    w = d + 1;
    r = '{ld_sel: 1'b0, key_op: (w == 1) ? KEY_LOAD : shift_op(SHIFTS[17-w]), key_clk: 1'b1,
          abc_clk: 1'b1, out_clk: (w == 16), last: (w == 16)};
    return r;
  endfunction

  // Word-line decoder shared by both ROMs: the five counter bits and their inverses, two
  // 2-to-4 predecoders on count[4:3] and count[2:1], and one 3-input AND per word line
  // (17 word lines). Counter values above 16 select no word; pre_hi[3] (counts 24..31) is
  // decoded, as a full 2-to-4 predecoder does, but drives no word line.
  logic [4:0]  cnt_n;
  logic [3:0]  pre_hi, pre_lo;
  logic [16:0] word_line;

  assign cnt_n = ~count;

  for (genvar i = 0; i < 4; i++) begin : g_pre
    assign pre_hi[i] = (i[1] ? count[4] : cnt_n[4]) & (i[0] ? count[3] : cnt_n[3]);
    assign pre_lo[i] = (i[1] ? count[2] : cnt_n[2]) & (i[0] ? count[1] : cnt_n[1]);
  end

  for (genvar w = 0; w < ENC_WORDS; w++) begin : g_wl
    assign word_line[w] = pre_hi[w / 8] & pre_lo[(w / 2) % 4] & (w[0] ? count[0] : cnt_n[0]);
  end

  // ROM bit lines: each is the OR of the selected word's bit over all word lines.
  ctrl_word_t enc_word, dec_word;

  always_comb begin
    enc_word = '0;
    dec_word = '0;
    for (int w = 0; w < ENC_WORDS; w++)
      enc_word |= {CTRL_W{word_line[w]}} & enc_rom(w);
    for (int d = 0; d < DEC_WORDS; d++)
      dec_word |= {CTRL_W{word_line[d + 1]}} & dec_rom(d);
    if (!busy)                         ctrl = '0;
    else if (decrypt && !word_line[0]) ctrl = dec_word;
    else                               ctrl = enc_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      count <= '0;
    end else if (launch && (!busy || ctrl.last)) begin
      busy  <= 1'b1;
      count <= chain ? 5'd1 : 5'd0;
    end else if (busy) begin
      if (ctrl.last) busy <= 1'b0;
      else           count <= count + 5'd1;
    end
  end

  // The counter never runs past the last word.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> count <= 5'd16);
endmodule
