// data_in_reg: the 96-bit Data-In register and its INPUT REGISTER EMPTY status.
//
// A write strobe stores a new block and marks the register full. When the block is copied
// into the A/B/C registers (take: the controller's load word, or the last round of a block
// that a chained block follows), the register is marked empty, so the host may write the
// next block while the current one is being processed. A write in the same cycle as a take
// keeps the register full with the new block. The write strobe and the
// full/empty flag are this design's choice of interface; the document only names the
// register and the status signal.
module data_in_reg #(
  parameter int unsigned W = 96
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,    // host writes d
  input  logic [W-1:0] d,
  input  logic         take,    // block copied into the data registers
  output logic [W-1:0] q,
  output logic         full,
  output logic         empty    // INPUT REGISTER EMPTY
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      full <= 1'b0;
    end else begin
      if (load) q <= d;
      if (load)      full <= 1'b1;
      else if (take) full <= 1'b0;
    end
  end

  assign empty = ~full;
endmodule
