// tb_mc_timeshare: feeds states byte by byte, in slot order, as masked bytes
// (byte ^ MASK) like the S-box delivers them, with occasional idle clocks.
// Each finished column must equal the reference MixColumns of the unmasked
// column, carry the right column index, and come out one clock after the
// row-3 byte; a row-0 byte must start a fresh column. Also checks the
// standard example column d4 bf 5d 30 -> 04 66 81 e5.
module tb_mc_timeshare;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  localparam logic [7:0] M = 8'hA5;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [3:0]  slot = 0;
  logic [7:0]  din = 0;
  logic        col_valid;
  logic [1:0]  col_idx;
  logic [31:0] col_out;
  int checks = 0, failures = 0, cols_seen = 0, cols_sent = 0;

  mc_timeshare #(.MASK(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_col [$];
  logic [1:0]  exp_idx [$];
  logic        expect_next = 0;

  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if (col_valid !== expect_next) begin
      failures++; $display("FAIL col_valid=%b expected %b", col_valid, expect_next);
    end
    if (col_valid) begin
      logic [31:0] e;
      logic [1:0]  ei;
      e = exp_col.pop_front();
      ei = exp_idx.pop_front();
      cols_seen++;
      checks++;
      if (col_out !== e || col_idx !== ei) begin
        failures++;
        if (failures < 6) $display("FAIL col %0d: %h exp %h", col_idx, col_out, e);
      end
    end
  end

  task automatic send_state(logic [127:0] s, bit gaps);
    for (int k = 0; k < 16; k++) begin
      if (gaps && $urandom_range(0, 4) == 0) begin
        @(negedge clk);
        in_valid = 0;
        expect_next = 0;
      end
      @(negedge clk);
      in_valid = 1;
      slot = 4'(k);
      din = s[127 - 8*k -: 8] ^ M;
      expect_next = (k % 4 == 3);
      if (k % 4 == 3) begin
        exp_col.push_back(mixcol_ref(s[127 - 32*(k/4) -: 32]));
        exp_idx.push_back(2'(k / 4));
        cols_sent++;
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // standard example: after SubBytes/ShiftRows column 0 is d4 bf 5d 30
    send_state(128'hd4bf5d30e0b452aeb84111f11e2798e5, 0);
    for (int n = 0; n < 100; n++) send_state(rand128(), n % 2 == 1);
    // an aborted column: rows 0,1 then a new column from row 0
    @(negedge clk);
    in_valid = 1; slot = 4'd0; din = 8'h12; expect_next = 0;
    @(negedge clk);
    slot = 4'd1; din = 8'h34;
    send_state(rand128(), 0);
    @(negedge clk);
    in_valid = 0; expect_next = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (cols_seen != cols_sent) begin
      failures++; $display("FAIL columns seen %0d sent %0d", cols_seen, cols_sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
