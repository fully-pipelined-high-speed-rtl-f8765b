// tb_byte_mux16: every select value on random states; byte k must be
// state[127-8k -: 8].
module tb_byte_mux16;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  logic [127:0] s;
  logic [3:0]   sel;
  logic [7:0]   d;
  int checks = 0, failures = 0;

  byte_mux16 dut (.state(s), .sel(sel), .dout(d));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      s = rand128();
      for (int k = 0; k < 16; k++) begin
        sel = 4'(k);
        #1;
        checks++;
        if (d !== bget(s, k % 4, k / 4)) begin
          failures++;
          if (failures < 5) $display("FAIL sel=%0d d=%h", k, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
