// mc_timeshare: one MixColumns unit shared by all four columns.
//
// Instead of waiting for a whole 32-bit column, the unit takes each S-box byte
// once, in the clock it arrives, and multiplies it at the same time by the four
// matrix coefficients of its row: byte s(r,c) contributes M[i][r] * s(r,c) to
// output row i of column c, with M the MixColumns matrix
//   02 03 01 01 / 01 02 03 01 / 01 01 02 03 / 03 01 01 02.
// The products ({01}, {02} = xtime, {03} = xtime ^ byte) are XORed into four
// 8-bit accumulators. A row-0 byte starts a column; with the row-3 byte the
// column is complete and leaves the unit as one 32-bit word, so the four
// columns of a state come out one after another, every four clocks.
// The bytes arrive masked with MASK (see sbox_cf); since a column of four
// equal bytes m is mapped to itself (02^03^01^01 = 01), the finished column is
// unmasked by XORing MASK into each of its bytes.
//
// Interface: in_valid, slot (column slot[3:2], row slot[1:0]) and din are
// sampled every clock; bytes of a column must arrive in row order 0..3 (an
// assertion checks this: a byte of row r > 0 must follow row r-1 of the same
// column, idle clocks in between allowed). The assertion is disabled during
// reset, so lint reports rst_n as used both asynchronously and synchronously;
// that use is only in the assertion and does not touch the logic.
// col_valid pulses for one clock, one clock after the row-3 byte, with
// col_idx and col_out (row 0 in [31:24]).
//
// The per-byte, four-products-at-once evaluation is the document's; the
// accumulator organisation, the column index output and the mask removal
// point are this design's own.
module mc_timeshare
  import aes_pkg::*;
#(
  parameter byte_t MASK = 8'hA5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  slot_t       slot,
  input  byte_t       din,
  output logic        col_valid,
  output logic [1:0]  col_idx,
  output word_t       col_out
);

  byte_t      acc [4];
  byte_t      term [4];
  byte_t      nxt [4];
  byte_t      x1, x2, x3;
  logic [1:0] row;

  assign row = slot[1:0];

  // last accepted slot, kept only for the row-order assertion
  slot_t prev_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        prev_slot <= 4'd15;
    else if (in_valid) prev_slot <= slot;
  end

  a_row_order: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && row != 2'd0) |-> (slot == prev_slot + 4'd1))
    else $error("mc_timeshare: byte of row %0d does not follow row %0d of its column",
                row, row - 2'd1);

  always_comb begin
    x1 = din;
    x2 = xtime(din);
    x3 = x2 ^ din;
    for (int i = 0; i < 4; i++) begin
      // coefficient of output row i for input row: M[i][row] = {02,03,01,01}[(row - i) mod 4]
      unique case (2'(row - 2'(i)))
        2'd0:    term[i] = x2;
        2'd1:    term[i] = x3;
        default: term[i] = x1;
      endcase
      nxt[i] = (row == 2'd0) ? term[i] : (acc[i] ^ term[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) acc[i] <= '0;
      col_valid <= 1'b0;
      col_idx   <= '0;
      col_out   <= '0;
    end else begin
      col_valid <= in_valid && (row == 2'd3);
      if (in_valid) begin
        for (int i = 0; i < 4; i++) acc[i] <= nxt[i];
        if (row == 2'd3) begin
          col_idx <= slot[3:2];
          col_out <= {nxt[0], nxt[1], nxt[2], nxt[3]} ^ {4{MASK}};
        end
      end
    end
  end

endmodule
