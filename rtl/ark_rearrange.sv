// ark_rearrange: Add Round Key with its output already in ShiftRows order.
//
// The 128-bit state is XORed with the round key, and the sixteen result bytes
// are wired out in the order ShiftRows would leave them: byte (row r, column c)
// of the output is byte (row r, column (c + r) mod 4) of state ^ key. Because
// SubBytes works byte by byte, substituting this rearranged state gives the
// same bytes as SubBytes followed by ShiftRows, so no separate ShiftRows stage
// (and no 128-bit register in front of it) is needed after the S-box.
//
// Interface: state_in, round_key and state_out are 128-bit blocks in the
// column-major byte layout of aes_pkg (byte 0 in [127:120]).
// Timing: purely combinational, no clock; the permutation is only wiring.
//
// The XOR and the rearrangement follow the document; keeping the block
// combinational (the time-slot controller registers its output) is this
// design's choice.
module ark_rearrange
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  block_t sum;
  assign sum = state_in ^ round_key;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        state_out[127 - 8*(4*c + r) -: 8] = sum[127 - 8*(4*((c + r) % 4) + r) -: 8];
      end
    end
  end

endmodule
