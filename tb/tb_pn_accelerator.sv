// End-to-end testbench of pn_accelerator, driven only through its host
// ports, at reduced sizes (12 places, hash table of 8 lists).
//
//   A: the 12-place net of the engine test. Two runs from two initial
//      markings on the same instance; each is compared with the reference
//      breadth-first search (state count, firings, duplicates), and every
//      record is read back through the host port and checked. During the
//      run the host tries to write the simulator and must be refused.
//   B: a net with an unbounded place: the run must stop on token overflow.
//   C: net A with storage for 8 records: the run must stop on a full
//      storage.
//
// Each mechanism of the design is counted and must occur at least once:
// firing, a state stored, a duplicate found, a list walked past a different
// state, a restore, a C flag set, a state loaded, a completed state skipped
// while choosing, the end of a run, both errors, a refused host write and a
// restart.
module tb_pn_accelerator;
  import pn_pkg::*;
  import pn_ref_pkg::*;
  localparam int N = 12, M = 10, TB = 4, HB = 3;
  localparam int NW32 = 2, REC_WORDS = 2;

  function automatic net_t mk_a(bit post);
    net_t r = '0;
    if (!post) begin
      r[0*N+0]=1; r[1*N+1]=1; r[2*N+2]=1;
      r[3*N+3]=1; r[4*N+4]=1; r[5*N+5]=1; r[6*N+6]=1; r[6*N+7]=1;
      r[7*N+2]=1; r[7*N+8]=1; r[8*N+9]=1; r[9*N+10]=1;
    end else begin
      r[0*N+1]=1; r[1*N+2]=1; r[2*N+0]=1;
      r[3*N+4]=1; r[3*N+5]=1; r[4*N+6]=1; r[5*N+7]=1; r[6*N+3]=1;
      r[7*N+9]=1; r[8*N+2]=1; r[8*N+8]=1; r[9*N+11]=1;
    end
    return r;
  endfunction
  // B: 4 places, 3 transitions. t0: p0 -> p0,p1 (pumps p1), t1: p1 -> p2, t2: p2 -> p3
  localparam int NB = 4, MB = 3;
  function automatic net_t mk_b(bit post);
    net_t r = '0;
    if (!post) begin r[0*NB+0]=1; r[1*NB+1]=1; r[2*NB+2]=1; end
    else begin r[0*NB+0]=1; r[0*NB+1]=1; r[1*NB+2]=1; r[2*NB+3]=1; end
    return r;
  endfunction
  localparam net_t PRE_A = mk_a(0), POST_A = mk_a(1);
  localparam net_t PRE_B = mk_b(0), POST_B = mk_b(1);
  localparam longint unsigned INIT1 = 64'h0000_0101_0000_2003; // p0=3 p3=2 p8=1 p10=1
  localparam longint unsigned INIT2 = 64'h0000_0001_0000_1012; // p0=2 p1=1 p3=1 p8=1

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- instance A
  logic a_start = 0, a_busy, a_done, a_dct, a_blocked, a_we = 0;
  err_t a_err; phase_e a_phase;
  logic [31:0] a_states, a_fires, a_dups, a_passed, a_cycles, a_wdata = 0, a_rdata;
  logic [0:0] a_saddr = 0;
  logic [15:0] a_maddr = 0;
  logic [63:0] a_mdata;
  pn_accelerator #(.N(N), .M(M), .TOKEN_BITS(TB), .PRE(PRE_A[M*N-1:0]), .POST(POST_A[M*N-1:0]),
                   .MEM_DEPTH(65536), .HASH_BITS(HB)) u_a (
    .clk, .rst_n, .start(a_start), .busy(a_busy), .done(a_done), .err(a_err), .phase(a_phase),
    .n_states(a_states), .n_fires(a_fires), .n_dups(a_dups), .n_passed(a_passed),
    .n_cycles(a_cycles), .dct_out(a_dct), .host_sim_we(a_we), .host_sim_addr(a_saddr),
    .host_sim_wdata(a_wdata), .host_sim_rdata(a_rdata), .host_mem_addr(a_maddr),
    .host_mem_rdata(a_mdata), .host_blocked(a_blocked));

  // ---------------- instance B
  logic b_start = 0, b_busy, b_done, b_dct, b_blocked, b_we = 0;
  err_t b_err; phase_e b_phase;
  logic [31:0] b_states, b_fires, b_dups, b_passed, b_cycles, b_wdata = 0, b_rdata;
  logic [15:0] b_maddr = 0;
  logic [63:0] b_mdata;
  pn_accelerator #(.N(NB), .M(MB), .TOKEN_BITS(TB), .PRE(PRE_B[MB*NB-1:0]), .POST(POST_B[MB*NB-1:0]),
                   .MEM_DEPTH(65536), .HASH_BITS(HB)) u_b (
    .clk, .rst_n, .start(b_start), .busy(b_busy), .done(b_done), .err(b_err), .phase(b_phase),
    .n_states(b_states), .n_fires(b_fires), .n_dups(b_dups), .n_passed(b_passed),
    .n_cycles(b_cycles), .dct_out(b_dct), .host_sim_we(b_we), .host_sim_addr(1'b0),
    .host_sim_wdata(b_wdata), .host_sim_rdata(b_rdata), .host_mem_addr(b_maddr),
    .host_mem_rdata(b_mdata), .host_blocked(b_blocked));

  // ---------------- instance C
  logic c_start = 0, c_busy, c_done, c_dct, c_blocked, c_we = 0;
  err_t c_err; phase_e c_phase;
  logic [31:0] c_states, c_fires, c_dups, c_passed, c_cycles, c_wdata = 0, c_rdata;
  logic [0:0] c_saddr = 0;
  logic [3:0] c_maddr = 0;
  logic [63:0] c_mdata;
  pn_accelerator #(.N(N), .M(M), .TOKEN_BITS(TB), .PRE(PRE_A[M*N-1:0]), .POST(POST_A[M*N-1:0]),
                   .MEM_DEPTH(16), .HASH_BITS(HB)) u_c (
    .clk, .rst_n, .start(c_start), .busy(c_busy), .done(c_done), .err(c_err), .phase(c_phase),
    .n_states(c_states), .n_fires(c_fires), .n_dups(c_dups), .n_passed(c_passed),
    .n_cycles(c_cycles), .dct_out(c_dct), .host_sim_we(c_we), .host_sim_addr(c_saddr),
    .host_sim_wdata(c_wdata), .host_sim_rdata(c_rdata), .host_mem_addr(c_maddr),
    .host_mem_rdata(c_mdata), .host_blocked(c_blocked));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #50ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters (instance A unless noted).
  int n_fire = 0, n_store = 0, n_restore = 0, n_complete = 0, n_load = 0, n_skip = 0;
  int n_done = 0, n_ovf = 0, n_full = 0, n_blocked = 0, n_restart = 0;
  phase_e a_prev = PH_IDLE;
  always @(posedge clk) if (rst_n) begin
    if (a_phase == PH_FIRE && !a_dct) n_fire++;
    if (a_phase == PH_STORE && a_prev != PH_STORE) n_store++;
    if (a_phase == PH_RESTORE && a_prev != PH_RESTORE) n_restore++;
    if (a_phase == PH_COMPLETE) n_complete++;
    if (a_phase == PH_LOAD && a_prev != PH_LOAD) n_load++;
    if (a_phase == PH_CHOOSE && a_prev == PH_CHOOSE) n_skip++;
    if (a_blocked) n_blocked++;
    a_prev <= a_phase;
  end

  task automatic run_a(longint unsigned init, bit try_write);
    bit seen [longint unsigned];
    bit stored [longint unsigned];
    longint unsigned recs [$];
    longint arcs;
    bit ovf;
    int nref;
    nref = reach(N, M, PRE_A, POST_A, TB, init, seen, arcs, ovf);
    for (int w = 0; w < NW32; w++) begin
      @(negedge clk); a_we = 1; a_saddr = 1'(w); a_wdata = init[32*w +: 32];
    end
    @(negedge clk); a_we = 0;
    for (int w = 0; w < NW32; w++) begin
      a_saddr = 1'(w); #1;
      check(a_rdata == init[32*w +: 32], "initial marking read back");
    end
    a_start = 1;
    @(negedge clk); a_start = 0;
    if (try_write) begin
      repeat (20) @(negedge clk);
      a_we = 1; a_saddr = 0; a_wdata = 32'hffff_ffff;
      @(negedge clk); a_we = 0;
    end
    wait (a_done || a_err != '0);
    @(negedge clk);
    n_done++;
    check(a_done && a_err == '0, "run A done");
    check(int'(a_states) == nref, $sformatf("A states %0d vs %0d", a_states, nref));
    check(longint'(a_fires) == arcs, "A firings");
    check(longint'(a_dups) == arcs - (nref - 1), "A duplicates");
    for (int r = 0; r < int'(a_states); r++) begin
      rec_hdr_t h;
      longint unsigned st;
      a_maddr = 16'(r * REC_WORDS);     #1; h = rec_hdr_t'(a_mdata);
      a_maddr = 16'(r * REC_WORDS + 1); #1; st = a_mdata;
      recs.push_back(st);
      check(seen.exists(st) && !stored.exists(st), "A record new and reachable");
      stored[st] = 1;
      check(h.c_flag, "A C flag");
      if (r == 0) check(st == init && !h.has_pred, "A record 0");
      else check(h.has_pred && int'(h.pred) < r &&
                 is_successor(N, M, PRE_A, POST_A, TB, recs[h.pred], st), "A predecessor");
    end
    $display("run A: %0d states, %0d firings, %0d cycles", a_states, a_fires, a_cycles);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // A, twice
    run_a(INIT1, 1);
    n_restart++;
    run_a(INIT2, 0);
    // B: overflow
    @(negedge clk); b_we = 1; b_wdata = 32'h0000_0001;
    @(negedge clk); b_we = 0; b_start = 1;
    @(negedge clk); b_start = 0;
    wait (b_done || b_err != '0);
    @(negedge clk);
    check(b_err.token_overflow && !b_done, "B stops on token overflow");
    if (b_err.token_overflow) n_ovf++;
    // C: storage full
    for (int w = 0; w < NW32; w++) begin
      @(negedge clk); c_we = 1; c_saddr = 1'(w); c_wdata = INIT1[32*w +: 32];
    end
    @(negedge clk); c_we = 0; c_start = 1;
    @(negedge clk); c_start = 0;
    wait (c_done || c_err != '0);
    @(negedge clk);
    check(c_err.storage_full && !c_done && c_states == 8, "C stops on full storage");
    if (c_err.storage_full) n_full++;
    $display("fire=%0d store=%0d dup=%0d passed=%0d restore=%0d complete=%0d load=%0d skip=%0d done=%0d ovf=%0d full=%0d blocked=%0d restart=%0d",
             n_fire, n_store, a_dups, a_passed, n_restore, n_complete, n_load, n_skip, n_done,
             n_ovf, n_full, n_blocked, n_restart);
    check(n_fire > 0, "mechanism: firing");
    check(n_store > 0, "mechanism: store");
    check(a_dups > 0, "mechanism: duplicate");
    check(a_passed > 0, "mechanism: list walk");
    check(n_restore > 0, "mechanism: restore");
    check(n_complete > 0, "mechanism: C flag");
    check(n_load > 0, "mechanism: load");
    check(n_skip > 0, "mechanism: skip completed");
    check(n_done == 2, "mechanism: done");
    check(n_ovf > 0, "mechanism: token overflow");
    check(n_full > 0, "mechanism: storage full");
    check(n_blocked > 0, "mechanism: host refused");
    check(n_restart > 0, "mechanism: restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
