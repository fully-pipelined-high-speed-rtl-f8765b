// state_combiner: joins the column stream of the shared MixColumns unit into
// whole 128-bit states.
//
// Columns 0..2 of a state are kept in a buffer as they arrive; when column 3
// arrives, the buffer and the new column are written together into the output
// register and out_valid pulses for one clock. out_state then stays unchanged
// until the next state is complete, 16 clocks later in a full stream.
//
// Interface: col_valid, col_idx and col_in (row 0 in [31:24]) in; out_valid and
// out_state (column 0 in [127:96]) out. A column is placed by its index, so a
// missing column leaves its previous contents. Timing: out_valid one clock
// after column 3.
//
// The document names this step only as combining the MixColumns outputs; the
// buffered, write-once output is this design's choice.
module state_combiner
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       col_valid,
  input  logic [1:0] col_idx,
  input  word_t      col_in,
  output logic       out_valid,
  output block_t     out_state
);

  word_t cols [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) cols[i] <= '0;
      out_valid <= 1'b0;
      out_state <= '0;
    end else begin
      out_valid <= col_valid && (col_idx == 2'd3);
      if (col_valid) begin
        if (col_idx == 2'd3) out_state <= {cols[0], cols[1], cols[2], col_in};
        else                 cols[col_idx] <= col_in;
      end
    end
  end

endmodule
