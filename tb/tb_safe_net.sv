// Safe-net configuration (one bit per place), the net class the first
// hardware version of this architecture was restricted to. The net is five
// dining philosophers who pick up the left fork, then the right one:
// places think_i (0-4), has_left_i (5-9), eat_i (10-14), fork_i (15-19);
// transitions take_left_i (0-4), take_right_i (5-9), release_i (10-14).
// The reachability set is compared with the reference search, and the
// deadlock marking (every philosopher holding the left fork, no fork on
// the table) must be among the stored states, with no successor: the kind
// of property the reachability set is computed for.
module tb_safe_net;
  import pn_pkg::*;
  import pn_ref_pkg::*;
  localparam int N = 20, M = 15, TB = 1, REC_WORDS = 2;

  function automatic net_t mk(bit post);
    net_t r = '0;
    for (int i = 0; i < 5; i++) begin
      int j;
      j = (i + 1) % 5;
      if (!post) begin
        r[i*N + i] = 1;            r[i*N + 15 + i] = 1;        // take_left
        r[(5+i)*N + 5 + i] = 1;    r[(5+i)*N + 15 + j] = 1;    // take_right
        r[(10+i)*N + 10 + i] = 1;                               // release
      end else begin
        r[i*N + 5 + i] = 1;
        r[(5+i)*N + 10 + i] = 1;
        r[(10+i)*N + i] = 1; r[(10+i)*N + 15 + i] = 1; r[(10+i)*N + 15 + j] = 1;
      end
    end
    return r;
  endfunction
  localparam net_t PRE_R = mk(0), POST_R = mk(1);
  localparam longint unsigned INIT = 64'h000F_801F;      // all thinking, all forks down
  localparam longint unsigned DEADLOCK = 64'h0000_03E0;  // all holding the left fork

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, dct_out, host_blocked, we = 0;
  err_t err; phase_e phase;
  logic [31:0] n_states, n_fires, n_dups, n_passed, n_cycles, wdata = 0, rdata;
  logic [0:0] saddr = 0;
  logic [11:0] maddr = 0;
  logic [63:0] mdata;

  pn_accelerator #(.N(N), .M(M), .TOKEN_BITS(TB), .PRE(PRE_R[M*N-1:0]), .POST(POST_R[M*N-1:0]),
                   .MEM_DEPTH(4096), .HASH_BITS(6)) dut (
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
    #10ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [longint unsigned];
    bit stored [longint unsigned];
    longint arcs;
    bit ovf, found_dead;
    int nref;
    nref = reach(N, M, PRE_R, POST_R, TB, INIT, seen, arcs, ovf);
    check(!ovf, "net is safe");
    check(seen.exists(DEADLOCK), "reference reaches the deadlock");
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); we = 1; saddr = 0; wdata = INIT[31:0];
    @(negedge clk); we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (done || err != '0);
    @(negedge clk);
    check(done && err == '0, "run done");
    check(int'(n_states) == nref, $sformatf("states %0d vs %0d", n_states, nref));
    check(longint'(n_fires) == arcs, "firings");
    found_dead = 0;
    for (int r = 0; r < int'(n_states); r++) begin
      longint unsigned st;
      maddr = 12'(r * REC_WORDS + 1); #1; st = mdata;
      check(seen.exists(st) && !stored.exists(st), "record new and reachable");
      stored[st] = 1;
      if (st == DEADLOCK) found_dead = 1;
    end
    check(found_dead, "deadlock state stored");
    begin
      bit any;
      any = 0;
      for (int t = 0; t < M; t++) if (enabled(N, t, PRE_R, DEADLOCK, TB)) any = 1;
      check(!any, "deadlock state has no enabled transition");
    end
    $display("safe net: %0d states, %0d firings, %0d cycles", n_states, n_fires, n_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
