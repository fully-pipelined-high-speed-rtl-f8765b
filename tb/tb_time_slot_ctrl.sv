// tb_time_slot_ctrl: offers states with random gaps and back to back; checks
// that each accepted state is held, that slots 0..15 follow the accepting edge
// one per clock, that in_ready is high exactly when idle or in slot 15, and
// that back-to-back states leave no empty slot (16 clocks per state).
module tb_time_slot_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, slot_valid;
  logic [127:0] state_in = '0, state_q;
  logic [3:0] slot;
  int checks = 0, failures = 0;
  int cycle = 0;
  int back_to_back = 0, gaps = 0;

  time_slot_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of the expected slot and held state
  logic [127:0] exp_state;
  int           exp_slot = -1;   // -1: idle

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      checks++;
      if (in_ready !== (exp_slot == -1 || exp_slot == 15)) begin
        failures++; $display("FAIL in_ready=%b exp_slot=%0d", in_ready, exp_slot);
      end
      if (in_valid && in_ready) begin
        if (exp_slot == 15) back_to_back++;
        if (exp_slot == -1) gaps++;
        exp_state = state_in;
        exp_slot  = 0;
      end else if (exp_slot == 15) exp_slot = -1;
      else if (exp_slot >= 0) exp_slot++;
      #1;
      checks++;
      if (slot_valid !== (exp_slot != -1) ||
          (exp_slot != -1 && (slot !== 4'(exp_slot) || state_q !== exp_state))) begin
        failures++;
        $display("FAIL slot_valid=%b slot=%0d exp=%0d", slot_valid, slot, exp_slot);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      in_valid = 1;
      state_in = rand128();
      while (!in_ready) @(negedge clk);
      @(posedge clk);                 // accepted on this edge
      if (n % 3 == 0) begin
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(0, 20)) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (back_to_back < 10 || gaps < 5) begin
      failures++; $display("FAIL back_to_back=%0d gaps=%0d", back_to_back, gaps);
    end
    $display("back_to_back=%0d gaps=%0d", back_to_back, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
