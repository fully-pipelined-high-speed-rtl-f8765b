// tb_sbox_cf: streams all 256 byte values through the S-box, one per clock,
// in both directions (SubBytes, InvSubBytes) and mixes the two modes clock by
// clock. Each output must equal the reference table value XOR MASK, appear
// exactly 3 clocks after its input, and carry its tag. A second instance with
// MASK = 0 must give the plain standard values (00 -> 63, 53 -> ed).
module tb_sbox_cf;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  localparam logic [7:0] M = 8'hA5;

  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0, inv = 0;
  logic [7:0] din = 0, dout, dout0;
  logic [7:0] tag_in = 0, tag_out, tag_out0;
  logic       out_valid, out_valid0;
  int checks = 0, failures = 0;

  sbox_cf #(.MASK(M), .TAG_W(8)) dut (.clk, .rst_n, .in_valid, .inv, .din, .tag_in,
                                      .out_valid, .dout, .tag_out);
  sbox_cf #(.MASK(8'h00), .TAG_W(8)) dut0 (.clk, .rst_n, .in_valid, .inv, .din, .tag_in,
                                           .out_valid(out_valid0), .dout(dout0), .tag_out(tag_out0));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected-output queue, shifted every clock: entry 2 is what appears after the next edge
  typedef struct packed { logic v; logic inv; logic [7:0] x; } ent_t;
  ent_t pipe [3];
  int   cyc = 0;

  always @(posedge clk) if (rst_n) begin
    pipe[2] <= pipe[1];
    pipe[1] <= pipe[0];
    pipe[0] <= '{v: in_valid, inv: inv, x: din};
  end

  always @(negedge clk) if (rst_n) begin
    logic [7:0] ref_v;
    checks++;
    if (out_valid !== pipe[2].v) begin
      failures++; $display("FAIL valid timing");
    end
    if (pipe[2].v) begin
      ref_v = pipe[2].inv ? inv_sbox_ref(pipe[2].x) : sbox_ref(pipe[2].x);
      checks += 3;
      if (dout !== (ref_v ^ M)) begin
        failures++;
        if (failures < 6) $display("FAIL inv=%b x=%h dout=%h exp=%h", pipe[2].inv, pipe[2].x, dout, ref_v ^ M);
      end
      if (dout0 !== ref_v) begin
        failures++;
        if (failures < 6) $display("FAIL mask0 inv=%b x=%h dout=%h exp=%h", pipe[2].inv, pipe[2].x, dout0, ref_v);
      end
      if (tag_out !== pipe[2].x) begin
        failures++; $display("FAIL tag");
      end
    end
  end

  initial begin
    for (int i = 0; i < 3; i++) pipe[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // known values of the standard table, MASK = 0 instance
    for (int pass = 0; pass < 3; pass++) begin
      for (int x = 0; x < 256; x++) begin
        @(negedge clk);
        in_valid = (pass != 2) || ($urandom_range(0, 3) != 0);
        inv      = (pass == 2) ? 1'($urandom) : 1'(pass);
        din      = 8'(x);
        tag_in   = 8'(x);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(negedge clk);
    // fixed spot checks of the plain table
    in_valid = 1; inv = 0; din = 8'h53; tag_in = 8'h53;
    @(negedge clk);
    in_valid = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (dout0 !== 8'hED || dout !== (8'hED ^ M)) begin
      failures++; $display("FAIL S(53)=%h", dout0);
    end
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
