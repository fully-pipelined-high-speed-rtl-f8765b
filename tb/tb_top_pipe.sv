// tb_top_pipe: end-to-end test of the SubBytes/MixColumns stage at its default
// parameters.
//
// 1. The standard AES-128 example: plaintext and cipher key go in as state and
//    round key; the output must be the state after round 1's MixColumns,
//    04 66 81 e5 e0 cb 19 9a 48 f8 d3 7a 28 06 26 4c. The first two S-box
//    bytes must be d4 and bf, each masked with the fixed mask.
// 2. A long back-to-back stream of random states and keys (in_valid held
//    high): every state must be taken in slot 15 of the previous one and the
//    outputs must be exactly 16 clocks apart.
// 3. Random states with random idle gaps and offers held off by in_ready.
// Every output and every column is compared with a reference model; latency
// from the accepting edge is checked (columns at 7 + 4c, state at 20). Each
// mechanism (back-to-back acceptance, acceptance from idle, a held-off offer,
// masked S-box output, column-by-column output) must be seen at least once.
module tb_top_pipe;
  timeunit 1ns;
  timeprecision 1ps;
  import aes_ref_pkg::*;

  localparam logic [7:0] MASK = 8'hA5;   // the top's default
  localparam int LAT_STATE = 20;
  localparam int LAT_COL0  = 7;

  logic         clk = 0, rst_n = 0, in_valid = 0, in_ready;
  logic [127:0] state_in = '0, round_key = '0, out_state;
  logic         col_valid, out_valid;
  logic [1:0]   col_idx;
  logic [31:0]  col_out;
  int checks = 0, failures = 0;

  top_pipe dut (.*);

  always #2.5 clk = ~clk;   // 5 ns per time slot

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  typedef struct { logic [127:0] exp; int t; } job_t;
  job_t jobs [$];
  job_t cjobs [$];
  int   cyc = 0, cidx = 0;
  int   n_b2b = 0, n_idle_accept = 0, n_held_off = 0, n_cols = 0, n_outs = 0, n_masked = 0;
  int   last_out = -1, n_spacing16 = 0;
  logic busy_model = 0; int slot_model = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && !in_ready) n_held_off++;
    if (in_valid && in_ready) begin
      job_t j;
      if (busy_model && slot_model == 15) n_b2b++;
      else n_idle_accept++;
      j.exp = stage_ref(state_in, round_key);
      j.t   = cyc;
      jobs.push_back(j);
      cjobs.push_back(j);
      busy_model = 1; slot_model = 0;
    end else if (busy_model) begin
      if (slot_model == 15) busy_model = 0;
      else slot_model++;
    end
    #1;
    if (col_valid) begin
      logic [31:0] e;
      n_cols++;
      e = cjobs[0].exp[127 - 32*cidx -: 32];
      checks += 2;
      if (col_out !== e || col_idx !== 2'(cidx)) begin
        failures++; $display("FAIL column %0d: %h exp %h", cidx, col_out, e);
      end
      if (cyc - cjobs[0].t != LAT_COL0 + 4*cidx) begin
        failures++; $display("FAIL column %0d latency %0d", cidx, cyc - cjobs[0].t);
      end
      if (cidx == 3) begin cidx = 0; void'(cjobs.pop_front()); end
      else cidx++;
    end
    if (out_valid) begin
      job_t j;
      n_outs++;
      checks += 2;
      if (jobs.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        j = jobs.pop_front();
        if (out_state !== j.exp) begin
          failures++; $display("FAIL state %h exp %h", out_state, j.exp);
        end
        if (cyc - j.t != LAT_STATE) begin
          failures++; $display("FAIL latency %0d", cyc - j.t);
        end
      end
      if (last_out >= 0 && cyc - last_out == 16) n_spacing16++;
      last_out = cyc;
    end
  end

  task automatic offer(logic [127:0] s, logic [127:0] k);
    @(negedge clk);
    in_valid = 1; state_in = s; round_key = k;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. worked example
    offer(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    @(negedge clk);
    in_valid = 0;
    // S-box output: first two bytes d4, bf, masked
    while (!dut.sb_valid) @(negedge clk);
    checks++;
    if (dut.sb_byte !== (8'hd4 ^ MASK)) begin failures++; $display("FAIL first sbox byte %h", dut.sb_byte); end
    else n_masked++;
    @(negedge clk);
    checks++;
    if (dut.sb_byte !== (8'hbf ^ MASK)) begin failures++; $display("FAIL second sbox byte %h", dut.sb_byte); end
    else n_masked++;
    while (!out_valid) @(negedge clk);
    checks++;
    if (out_state !== 128'h046681e5e0cb199a48f8d37a2806264c) begin
      failures++; $display("FAIL example %h", out_state);
    end
    repeat (4) @(negedge clk);

    // 2. back-to-back stream
    for (int n = 0; n < 200; n++) offer(rand128(), rand128());
    // 3. gaps and held-off offers
    for (int n = 0; n < 200; n++) begin
      offer(rand128(), rand128());
      if ($urandom_range(0, 2) == 0) begin
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(0, 25)) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (40) @(negedge clk);

    checks++;
    if (jobs.size() != 0 || n_outs != 401) begin
      failures++; $display("FAIL outputs %0d, %0d left", n_outs, jobs.size());
    end
    checks++;
    if (n_spacing16 < 199) begin
      failures++; $display("FAIL only %0d outputs at full rate", n_spacing16);
    end
    $display("mechanisms: back_to_back=%0d idle_accept=%0d held_off=%0d masked_bytes=%0d columns=%0d states=%0d",
             n_b2b, n_idle_accept, n_held_off, n_masked, n_cols, n_outs);
    checks += 5;
    if (n_b2b == 0)         begin failures++; $display("FAIL no back-to-back acceptance"); end
    if (n_idle_accept == 0) begin failures++; $display("FAIL no acceptance from idle"); end
    if (n_held_off == 0)    begin failures++; $display("FAIL no held-off offer"); end
    if (n_masked == 0)      begin failures++; $display("FAIL no masked S-box byte"); end
    if (n_cols != 4 * n_outs) begin failures++; $display("FAIL column count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
