// data_out_reg: the 96-bit Data-Out (final output) register and the ITERATION READY status.
//
// The controller clocks the register once per block, in the cycle of round 16, with the
// result after the final permutation. ITERATION READY is high for the one cycle that
// follows, so the host sees one pulse per result even when blocks run back to back; the
// result stays in the register until the next block's round 16 (at least 17 cycles). The
// pulse form of the status is this design's choice.
module data_out_reg #(
  parameter int unsigned W = 96
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         capture,    // clock enable from the controller
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         ready       // ITERATION READY
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      ready <= 1'b0;
    end else begin
      if (capture) q <= d;
      ready <= capture;
    end
  end
endmodule
