// sbox: one EDES S-box, a 64-word x 4-bit ROM addressed through a two-stage decoder.
//
// The six inputs x1..x6 (x1 is the MSB of x) reach the ROM address pins a..f as
//   x1->a, x2->f, x3->b, x4->c, x5->d, x6->e.
// The first decoder stage splits the address into the pairs (a,b), (c,d), (e,f) and decodes
// each pair into four lines with two-input ANDs (6 inverters, 12 AND2). The second stage
// combines one line of each pair with a three-input AND into one of 64 word lines. Each
// output bit is the OR of the word lines whose stored word has that bit set, as in a
// NOR/pseudo-NMOS ROM. Row and column follow the DES rule: x1,x6 select the row and x2..x5
// the column. The pin wiring, the decoder split and the ROM follow the document; the table
// contents are the DES tables (S-box INDEX and INDEX+8 share DES table INDEX), which is this
// design's choice. Purely combinational.
module sbox
  import edes_pkg::*;
#(
  parameter int unsigned INDEX = 1   // 1..16
) (
  input  logic [5:0] x,   // {x1, x2, x3, x4, x5, x6}
  output logic [3:0] y
);
  localparam int TABLE = (INDEX - 1) % 8;

  // Stored word at ROM address {a,b,c,d,e,f}.
  function automatic logic [3:0] rom_word(input logic [5:0] addr);
    logic [5:0] xs;
    // a=x1, b=x3, c=x4, d=x5, e=x6, f=x2
    xs = {addr[5], addr[0], addr[4], addr[3], addr[2], addr[1]};
    return s_lookup(TABLE, xs);
  endfunction

  // Bit column bit_no of the ROM: which of the 64 words store a one in that output bit.
  function automatic logic [63:0] rom_column(input logic [1:0] bit_no);
    logic [63:0] col;
    for (int w = 0; w < 64; w++) begin
      logic [3:0] wd;
      wd     = rom_word(6'(w));
      col[w] = wd[bit_no];
    end
    return col;
  endfunction

  logic a, b, c, d, e, f;
  assign {a, f, b, c, d, e} = x;

  // First stage: three 2-to-4 predecoders.
  logic [3:0] pre_ab, pre_cd, pre_ef;
  always_comb begin
    pre_ab = {a & b, a & ~b, ~a & b, ~a & ~b};
    pre_cd = {c & d, c & ~d, ~c & d, ~c & ~d};
    pre_ef = {e & f, e & ~f, ~e & f, ~e & ~f};
  end

  // Second stage: 64 three-input ANDs.
  logic [63:0] word_line;
  always_comb begin
    for (int w = 0; w < 64; w++)
      word_line[w] = pre_ab[w[5:4]] & pre_cd[w[3:2]] & pre_ef[w[1:0]];
  end

  // ROM array.
  always_comb begin
    for (int bi = 0; bi < 4; bi++)
      y[bi] = |(word_line & rom_column(2'(bi)));
  end
endmodule
