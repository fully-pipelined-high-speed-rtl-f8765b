// tb_ark_rearrange: checks the rearranged Add Round Key against XOR followed
// by a reference ShiftRows, on the worked example (round-1 input of the
// standard AES-128 example, key zero) and on random states and keys.
module tb_ark_rearrange;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  logic [127:0] s, k, o;
  int checks = 0, failures = 0;

  ark_rearrange dut (.state_in(s), .round_key(k), .state_out(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // columns 19 3d e3 be | a0 f4 e2 2b | 9a c6 8d 2a | e9 f8 48 08
    s = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    k = '0;
    #1;
    checks++;
    if (o !== 128'h19f48d08a0c648be9af8e32be93de22a) begin
      failures++; $display("FAIL example: %h", o);
    end
    for (int i = 0; i < 1000; i++) begin
      s = rand128(); k = rand128();
      #1;
      checks++;
      if (o !== shiftrows_ref(s ^ k)) begin
        failures++;
        if (failures < 5) $display("FAIL s=%h k=%h o=%h", s, k, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
