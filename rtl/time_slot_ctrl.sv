// time_slot_ctrl: state holding register and time-slot counter.
//
// One 128-bit state is processed in sixteen time slots, one byte per clock.
// This block captures the rearranged Add Round Key output when a new state is
// accepted and then counts the 4-bit time slot 0..15; the slot number is the
// select of the 16:1 byte multiplexer and travels with the byte down the
// pipeline, so the S-box and the MixColumns unit know which byte they hold.
// A new state can be accepted in slot 15 of the current one, so states stream
// back to back with no idle slot: one state every 16 clocks.
//
// Interface: in_valid / in_ready handshake on state_in (a transfer happens on a
// rising clock edge with both high); state_q is the held state; slot and
// slot_valid describe the byte being fed this clock.
// Timing: after the accepting edge, slot_valid is high for 16 clocks with
// slot = 0, 1, .. 15. Reset (asynchronous, active low) empties the block.
//
// The document states only that the select is a 4-bit count driven by the
// clock; the holding register and the handshake are this design's choice.
module time_slot_ctrl
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t state_in,
  output block_t state_q,
  output slot_t  slot,
  output logic   slot_valid
);

  logic accept;

  assign in_ready = !slot_valid || (slot == 4'd15);
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= '0;
      slot       <= '0;
      slot_valid <= 1'b0;
    end else begin
      if (accept) begin
        state_q    <= state_in;
        slot       <= '0;
        slot_valid <= 1'b1;
      end else if (slot_valid) begin
        slot       <= slot + 4'd1;
        slot_valid <= (slot != 4'd15);
      end
    end
  end

endmodule
