// tb_aes128_rounds: uses the SubBytes/MixColumns stage for a whole AES-128
// encryption. The stage computes MixColumns(ShiftRows(SubBytes(s ^ k))), so
// nine passes with round keys 0..8 give the state of round 9 before its round
// key; the testbench then finishes in its model: AddRoundKey 9, the final
// round's SubBytes and ShiftRows (which has no MixColumns) and AddRoundKey 10.
// Key expansion is done by the testbench as well.
// Three encryptions are interleaved: in every pass the three states go in back
// to back and come out 16 clocks apart. Encryption 0 is the standard example
// (key 2b7e1516..., plaintext 3243f6a8...), whose ciphertext must be
// 3925841d02dc09fbdc118597196a0b32 and whose first pass must give
// 046681e5e0cb199a48f8d37a2806264c; the other two use random data and are
// compared with the reference encryption.
module tb_aes128_rounds;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  localparam int NB = 3;

  logic         clk = 0, rst_n = 0, in_valid = 0, in_ready;
  logic [127:0] state_in = '0, round_key = '0, out_state;
  logic         col_valid, out_valid;
  logic [1:0]   col_idx;
  logic [31:0]  col_out;
  int checks = 0, failures = 0;

  top_pipe dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] pt [NB], key [NB], st [NB];
  rkeys_t       rk [NB];
  int           got;

  // collect outputs in order
  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid && got < NB) begin
      st[got] = out_state;
      got++;
    end
  end

  initial begin
    pt[0]  = 128'h3243f6a8885a308d313198a2e0370734;
    key[0] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int b = 1; b < NB; b++) begin pt[b] = rand128(); key[b] = rand128(); end
    for (int b = 0; b < NB; b++) begin rk[b] = key_expand(key[b]); st[b] = pt[b]; end
    checks++;
    if (rk[0][10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++; $display("FAIL reference key expansion");
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int r = 0; r < 9; r++) begin
      got = 0;
      for (int b = 0; b < NB; b++) begin
        @(negedge clk);
        in_valid = 1; state_in = st[b]; round_key = rk[b][r];
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
      @(negedge clk);
      in_valid = 0;
      while (got < NB) @(negedge clk);
      if (r == 0) begin
        checks++;
        if (st[0] !== 128'h046681e5e0cb199a48f8d37a2806264c) begin
          failures++; $display("FAIL round 1 state %h", st[0]);
        end
      end
    end

    for (int b = 0; b < NB; b++) begin
      logic [127:0] ct;
      ct = shiftrows_ref(subbytes_ref(st[b] ^ rk[b][9])) ^ rk[b][10];
      checks++;
      if (ct !== aes128_encrypt_ref(pt[b], key[b])) begin
        failures++; $display("FAIL encryption %0d: %h", b, ct);
      end
      if (b == 0) begin
        checks++;
        if (ct !== 128'h3925841d02dc09fbdc118597196a0b32) begin
          failures++; $display("FAIL standard ciphertext %h", ct);
        end else $display("standard example ciphertext %h", ct);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
