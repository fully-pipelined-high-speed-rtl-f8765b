// top_pipe: time-shared SubBytes and MixColumns stage of an AES-128 encryption
// round, with ShiftRows removed.
//
// Data path, one byte per clock:
//   ark_rearrange   state ^ round_key, bytes already in ShiftRows order
//   time_slot_ctrl  holds that 128-bit state, counts the time slot 0..15
//   byte_mux16      16:1 multiplexer, picks byte <slot>
//   sbox_cf         the only S-box, composite field, 3-clock pipeline,
//                   output masked with MASK; the slot rides along as a tag
//   mc_timeshare    the only MixColumns unit, accumulates each byte into its
//                   column and emits a finished, unmasked column every 4 clocks
//   state_combiner  joins the four columns into the output state
// out_state = MixColumns(ShiftRows(SubBytes(state_in ^ round_key))), the
// AddRoundKey of one round followed by the SubBytes, ShiftRows and MixColumns
// of the next.
//
// Interface: in_valid/in_ready handshake on state_in and round_key (byte 0 in
// [127:120], column-major); col_valid/col_idx/col_out give each column as soon
// as it is done; out_valid pulses with a complete out_state. Asynchronous
// active-low reset.
// Timing: a state accepted on clock edge 0 gives column 0 at edge 7, column c
// at edge 7 + 4c, and out_valid at edge 20. A new state is accepted every 16
// clocks, back to back (in_ready is high in slot 15 and when idle).
//
// The stages, the single shared S-box and MixColumns unit, the 16:1 mux and
// the rearranged Add Round Key are the document's; the handshake, the column
// output port and the mask value are this design's. The S-box's inverse mode is
// tied off here, since a forward MixColumns follows it.
module top_pipe
  import aes_pkg::*;
#(
  parameter byte_t MASK = 8'hA5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  block_t     state_in,
  input  block_t     round_key,
  output logic       col_valid,
  output logic [1:0] col_idx,
  output word_t      col_out,
  output logic       out_valid,
  output block_t     out_state
);

  block_t rearranged, held;
  slot_t  slot, sb_slot;
  logic   slot_valid, sb_valid;
  byte_t  mux_byte, sb_byte;

  ark_rearrange u_ark (
    .state_in  (state_in),
    .round_key (round_key),
    .state_out (rearranged)
  );

  time_slot_ctrl u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .state_in   (rearranged),
    .state_q    (held),
    .slot       (slot),
    .slot_valid (slot_valid)
  );

  byte_mux16 u_mux (
    .state (held),
    .sel   (slot),
    .dout  (mux_byte)
  );

  sbox_cf #(.MASK(MASK), .TAG_W(4)) u_sbox (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (slot_valid),
    .inv       (1'b0),
    .din       (mux_byte),
    .tag_in    (slot),
    .out_valid (sb_valid),
    .dout      (sb_byte),
    .tag_out   (sb_slot)
  );

  mc_timeshare #(.MASK(MASK)) u_mc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sb_valid),
    .slot      (sb_slot),
    .din       (sb_byte),
    .col_valid (col_valid),
    .col_idx   (col_idx),
    .col_out   (col_out)
  );

  state_combiner u_comb (
    .clk       (clk),
    .rst_n     (rst_n),
    .col_valid (col_valid),
    .col_idx   (col_idx),
    .col_in    (col_out),
    .out_valid (out_valid),
    .out_state (out_state)
  );

endmodule
