// sbox_cf: pipelined composite-field AES S-box with a shared inverter and a
// masked output.
//
// The byte is mapped into GF((2^4)^2) (GF(2^4) on x^4+x+1, y^2+y+lambda with
// lambda = {1110}), where a = ah*y + al has the inverse
//   a^-1 = (ah*d^-1) y + (ah^al)*d^-1,  d = lambda*ah^2 ^ ah*al ^ al^2,
// so only a GF(2^4) inversion, a few GF(2^4) multipliers and squarers are
// needed instead of a 256-entry table. The result is mapped back to GF(2^8).
// The multiplicative inverse is shared by both directions: with inv = 0 the
// byte is inverted and then passed through the affine transformation
// (SubBytes); with inv = 1 the inverse affine transformation comes first and
// the inverted byte is the result (InvSubBytes).
// The value leaving the S-box is never the plain table value: it is XORed with
// the fixed byte MASK (folded into the affine constant). MixColumns turns a
// column of four equal mask bytes into the same column, so a later MixColumns
// stage can remove the mask with one XOR.
//
// Pipeline (three register banks): input register; the map, the d computation
// and the GF(2^4) inversion; a register holding d^-1, ah^al and ah; the two
// multipliers, the inverse map and the affine stage; the output register.
// Interface: in_valid/din/inv/tag_in are sampled every clock; out_valid, dout
// and tag_out appear 3 clocks later. tag_in is carried along unchanged (the top
// uses it for the time slot). No stall: the pipeline advances every clock.
//
// The field structure, the lambda constant, the stage split and the shared
// inverse follow the document; the isomorphism matrices, the mask value and
// the tag port are this design's own. MAP_ROWS / IMAP_ROWS are the
// isomorphism into and out of GF((2^4)^2): output bit i is the XOR of the
// input bits selected by row i. They were found by searching GF(2^8) for a root
// of x^4 + x + 1 and a root of y^2 + y + lambda; any such pair gives the same
// S-box values.
module sbox_cf
  import aes_pkg::*;
#(
  parameter byte_t MASK  = 8'hA5,
  parameter int    TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             inv,
  input  byte_t            din,
  input  logic [TAG_W-1:0] tag_in,
  output logic             out_valid,
  output byte_t            dout,
  output logic [TAG_W-1:0] tag_out
);

  localparam nibble_t GF16_LAMBDA = 4'hE;
  localparam byte_t   MAP_ROWS  [8] = '{8'h01, 8'hD4, 8'h2E, 8'hB4, 8'h70, 8'hD2, 8'hAC, 8'hA0};
  localparam byte_t   IMAP_ROWS [8] = '{8'h01, 8'hB0, 8'h92, 8'h52, 8'h1A, 8'h74, 8'h7E, 8'hF4};

  // stage 0: input register
  logic             v0, inv0;
  byte_t            x0;
  logic [TAG_W-1:0] t0;

  // stage 1: after the GF(2^4) inversion
  logic             v1, inv1;
  nibble_t          ah1, sum1, dinv1;
  logic [TAG_W-1:0] t1;

  // stage 1 combinational
  byte_t   pre, mapped;
  nibble_t ah, al, d;

  always_comb begin
    pre    = inv0 ? (inv_affine_lin(x0) ^ 8'h05) : x0;
    mapped = gf2_matvec(MAP_ROWS, pre);
    ah     = mapped[7:4];
    al     = mapped[3:0];
    d      = gf16_mul(gf16_sq(ah), GF16_LAMBDA) ^ gf16_mul(ah, al) ^ gf16_sq(al);
  end

  // stage 2 combinational
  byte_t comp_inv, field_inv, result;

  always_comb begin
    comp_inv  = {gf16_mul(ah1, dinv1), gf16_mul(sum1, dinv1)};
    field_inv = gf2_matvec(IMAP_ROWS, comp_inv);
    result    = inv1 ? (field_inv ^ MASK) : (affine_lin(field_inv) ^ (8'h63 ^ MASK));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0;  inv0 <= 1'b0;  x0 <= '0;  t0 <= '0;
      v1 <= 1'b0;  inv1 <= 1'b0;  ah1 <= '0;  sum1 <= '0;  dinv1 <= '0;  t1 <= '0;
      out_valid <= 1'b0;  dout <= '0;  tag_out <= '0;
    end else begin
      v0    <= in_valid;
      inv0  <= inv;
      x0    <= din;
      t0    <= tag_in;

      v1    <= v0;
      inv1  <= inv0;
      ah1   <= ah;
      sum1  <= ah ^ al;
      dinv1 <= gf16_inv(d);
      t1    <= t0;

      out_valid <= v1;
      dout      <= result;
      tag_out   <= t1;
    end
  end

endmodule
