// sys_ctrl: the system-level controller, which decouples the crypting sequence from the
// host's data transfers.
//
// While START is high and a key has been loaded, it launches a block as soon as the Data-In
// register is full and the crypting controller is idle or on its last word. At each launch it
// samples the ENCRYPT/DECRYPT pin into the mode bit used for the whole block. START as a
// level and the launch rule are this design's reading of the document's START description.
//
// Chaining ("if another data word is already read the crypting can continue without any
// delay"): a launch on the last word of a running block may skip the load word. The A/B/C
// registers then take the next block in the round-16 cycle, while the Data-Out register
// takes the result, and the next block starts at round 1. Skipping the load word also skips
// its key load, so chaining is only allowed when the key-shift registers are already right
// for round 1 of the next block:
//   - next block decrypts: its first decryption word reloads the key anyway;
//   - next block encrypts after an encryption with no key loaded since the last load word:
//     the 28 rotations of a block leave the key-shift registers back at rotation 0.
// After a decryption, or after LOAD KEY, the next encryption goes through the load word.
module sys_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,       // START
  input  logic encrypt,     // ENCRYPT/DECRYPT pin, 1 = encrypt
  input  logic load_key,    // LOAD KEY
  input  logic key_full,    // key register loaded
  input  logic din_full,    // Data-In register holds a block
  input  logic busy,        // crypting controller running
  input  logic last,        // crypting controller on its last word
  output logic launch,
  output logic chain,       // this launch skips the load word
  output logic decrypt      // mode of the block in progress
);
  logic key_new;            // key register reloaded since the last load word

  assign launch = start && key_full && din_full && (!busy || last);
  assign chain  = launch && busy && (!encrypt || (!decrypt && !key_new));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decrypt <= 1'b0;
      key_new <= 1'b1;
    end else begin
      if (launch) decrypt <= ~encrypt;
      if (load_key)              key_new <= 1'b1;
      else if (launch && !chain) key_new <= 1'b0;
    end
  end
endmodule
