// byte_mux16: the 16-to-1 byte multiplexer in front of the shared S-box.
//
// It picks byte number sel (0..15) out of the 128-bit rearranged state, so
// that stepping sel through 0..15 feeds the S-box one byte per time slot:
// column 0 rows 0..3 first, then column 1, and so on. That column-major order
// lets the shared MixColumns unit finish one column every four slots.
//
// Interface: state (128 bits, byte 0 in [127:120]), sel (4 bits), dout (8 bits).
// Timing: combinational.
//
// The 16:1 multiplexer with a 4-bit select is the document's; the byte order
// of the select follows its example of the first S-box outputs.
module byte_mux16
  import aes_pkg::*;
(
  input  block_t state,
  input  slot_t  sel,
  output byte_t  dout
);

  always_comb begin
    dout = '0;
    for (int k = 0; k < 16; k++)
      if (sel == slot_t'(k)) dout = get_byte(state, k);
  end

endmodule
