// key_parity_check: Key Error status for the 128-bit key.
//
// Every byte of the two 64-bit keys carries one parity bit. On LOAD KEY the checker
// evaluates all sixteen bytes and stores Key Error, high when any byte fails. The document
// proposes this check without building it; odd parity per byte (the DES convention) is this
// design's choice. The flag is registered and cleared by reset.
module key_parity_check
  import edes_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_key,
  input  logic [KEY_W-1:0] key_in,
  output logic             key_error
);
  logic [KEY_W/8-1:0] byte_bad;

  always_comb begin
    for (int i = 0; i < int'(KEY_W / 8); i++)
      byte_bad[i] = ~(^key_in[8*i +: 8]);   // even number of ones
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        key_error <= 1'b0;
    else if (load_key) key_error <= |byte_bad;
  end
endmodule
