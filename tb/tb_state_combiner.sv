// tb_state_combiner: sends groups of four columns (index 0..3) with random
// spacing; out_valid must pulse once, one clock after column 3, with the four
// columns in order, and out_state must not change until the next group ends.
module tb_state_combiner;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0, col_valid = 0, out_valid;
  logic [1:0]   col_idx = 0;
  logic [31:0]  col_in = 0;
  logic [127:0] out_state;
  int checks = 0, failures = 0;

  state_combiner dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] last = '0;
  logic         expect_v = 0;
  logic [127:0] exp_s;

  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if (out_valid !== expect_v) begin
      failures++; $display("FAIL out_valid=%b", out_valid);
    end
    if (out_valid) begin
      checks++;
      if (out_state !== exp_s) begin
        failures++; $display("FAIL out %h exp %h", out_state, exp_s);
      end
      last = out_state;
    end else begin
      checks++;
      if (out_state !== last) begin
        failures++; $display("FAIL out_state changed without out_valid");
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [127:0] s;
      s = rand128();
      for (int c = 0; c < 4; c++) begin
        repeat ($urandom_range(0, 2)) begin
          @(negedge clk);
          col_valid = 0; expect_v = 0;
        end
        @(negedge clk);
        col_valid = 1; col_idx = 2'(c); col_in = s[127 - 32*c -: 32];
        expect_v = (c == 3);
        if (c == 3) exp_s = s;
      end
    end
    @(negedge clk);
    col_valid = 0; expect_v = 0;
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
