// Step-cost workload at the default net size: 100 places with 4-bit
// counters (13 simulator words, 8-word records), hash table cut to 512
// lists so that a ring of 100 places with two tokens (5050 states) gives
// lists of about 10 states, the sizes of the step-cost estimate the
// design is built around (about N(S+5)/16 = 94 cycles for N = 100,
// S = 10).
//
// For every firing the testbench measures the cycles from FIRE to the end
// of RESTORE and the records visited in the list search, and checks
//   cycles <= 1 + NW32 + 1 + visited*REC_WORDS + REC_WORDS + NW32
// (fire, read, hash table, search, store, restore). It reports the average
// step cost next to the estimate evaluated at the measured list length.
module tb_table1_workload;
  import pn_pkg::*;
  localparam int N = 100, NW32 = 13, REC_WORDS = 8, HB = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, dct_out, host_blocked, we = 0;
  err_t err; phase_e phase;
  logic [31:0] n_states, n_fires, n_dups, n_passed, n_cycles, wdata = 0, rdata;
  logic [3:0] saddr = 0;
  logic [15:0] maddr = 0;
  logic [63:0] mdata;

  pn_accelerator #(.HASH_BITS(HB)) dut (
    .clk, .rst_n, .start, .busy, .done, .err, .phase, .n_states, .n_fires, .n_dups,
    .n_passed, .n_cycles, .dct_out, .host_sim_we(we), .host_sim_addr(saddr),
    .host_sim_wdata(wdata), .host_sim_rdata(rdata), .host_mem_addr(maddr),
    .host_mem_rdata(mdata), .host_blocked);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-step measurement
  int in_step = 0, step_cyc = 0, visited = 0, n_steps = 0, bad = 0;
  longint sum_cyc = 0, sum_vis = 0;
  logic [31:0] passed0 = 0, dups0 = 0;
  phase_e prev = PH_IDLE;
  always @(posedge clk) if (rst_n) begin
    // a step ends when RESTORE is left
    if (in_step != 0 && prev == PH_RESTORE && phase != PH_RESTORE) begin
      int v, bound;
      v = int'(n_passed - passed0) + int'(n_dups - dups0);
      bound = 1 + NW32 + 1 + v * REC_WORDS + REC_WORDS + NW32;
      if (step_cyc > bound) bad++;
      sum_cyc += step_cyc; sum_vis += v; n_steps++;
      in_step = 0;
    end
    if (phase == PH_FIRE && !dct_out) begin
      in_step = 1; step_cyc = 0; passed0 = n_passed; dups0 = n_dups;
    end
    if (in_step != 0) step_cyc++;
    prev = phase;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NW32; w++) begin
      @(negedge clk); we = 1; saddr = 4'(w); wdata = (w == 0) ? 32'd2 : 32'd0;
    end
    @(negedge clk); we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (done || err != '0);
    @(negedge clk);
    check(done && err == '0, "run done");
    check(n_states == 5050 && n_fires == 10000, "reachability set of the ring");
    check(n_steps == 10000, $sformatf("steps measured %0d", n_steps));
    check(bad == 0, $sformatf("%0d steps over the phase bound", bad));
    begin
      longint avg_cyc_x10, s_final_x10, est_x10;
      avg_cyc_x10 = sum_cyc * 10 / n_steps;
      s_final_x10 = longint'(n_states) * 10 / (1 << HB);
      est_x10 = N * (s_final_x10 + 50) / 16;
      $display("steps=%0d avg cycles/step=%0d.%0d avg records visited=%0d.%0d final list length=%0d.%0d estimate N(S+5)/16=%0d.%0d",
               n_steps, avg_cyc_x10 / 10, avg_cyc_x10 % 10, sum_vis * 10 / n_steps / 10,
               sum_vis * 10 / n_steps % 10, s_final_x10 / 10, s_final_x10 % 10, est_x10 / 10, est_x10 % 10);
      check(s_final_x10 >= 90 && s_final_x10 <= 110, "lists of about 10 states at the end");
      check(avg_cyc_x10 <= est_x10, "average step no slower than the estimate at the final list length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
