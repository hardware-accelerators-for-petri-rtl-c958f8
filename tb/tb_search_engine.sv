// Testbench for search_engine: the engine drives a real pn_simulator,
// state_memory and hash_table on a 12-place, 10-transition net (a token
// ring, a fork/join pair, a shared resource and a one-shot transition)
// with only 8 hash codes, so lists hold several states. The reachability
// set, the number of firings and of duplicates are compared with the
// breadth-first reference in pn_ref_pkg; every stored record is read back
// and checked (known state, no duplicate, C flag set, predecessor is a
// state it can be reached from in one firing). The length of every phase
// is checked against the step cost model: firing 1 cycle, reading the
// state NW32 cycles, hash table 1 cycle, list search at most REC_WORDS per
// listed record, storing REC_WORDS cycles, restoring at most NW32 cycles.
module tb_search_engine;
  import pn_pkg::*;
  import pn_ref_pkg::*;
  localparam int N = 12, M = 10, TB = 4, HB = 3, DEPTH = 4096;
  localparam int NW32 = 2, REC_WORDS = 2;

  function automatic net_t mk(bit post);
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
  localparam net_t PRE_R  = mk(0);
  localparam net_t POST_R = mk(1);
  localparam longint unsigned INIT = 64'h0000_0101_0000_2003; // p0=3 p3=2 p8=1 p10=1

  logic clk = 0, rst_n = 0, start;
  logic busy, done, dct_out, sim_overflow;
  err_t err;
  phase_e phase;
  logic [31:0] n_states, n_fires, n_dups, n_passed, n_cycles;
  logic sim_step, sim_clear_fired, sim_clear_err, e_wr_en, sim_wr_en, mem_we;
  logic [0:0] e_rd_addr, e_wr_addr, sim_rd_addr, sim_wr_addr;
  logic [31:0] sim_rd_data, e_wr_data, sim_wr_data;
  logic [11:0] e_mem_addr, mem_addr;
  logic [63:0] mem_wdata, mem_rdata;
  logic hash_clear, hash_we, hash_valid;
  logic [HB-1:0] hash_addr;
  logic [15:0] hash_wr_head, hash_head;
  logic [M-1:0] t_fire;
  // testbench side of the ports while the engine is idle
  logic tb_wr_en; logic [0:0] tb_wr_addr; logic [31:0] tb_wr_data; logic [11:0] tb_mem_addr;

  search_engine #(.N(N), .TOKEN_BITS(TB), .MEM_DEPTH(DEPTH), .HASH_BITS(HB)) dut (
    .clk, .rst_n, .start, .busy, .done, .err, .phase, .n_states, .n_fires, .n_dups,
    .n_passed, .n_cycles, .sim_step, .sim_clear_fired, .sim_clear_err,
    .sim_rd_addr(e_rd_addr), .sim_rd_data, .sim_wr_en(e_wr_en), .sim_wr_addr(e_wr_addr),
    .sim_wr_data(e_wr_data), .sim_dct_out(dct_out), .sim_overflow,
    .mem_addr(e_mem_addr), .mem_we, .mem_wdata, .mem_rdata,
    .hash_clear, .hash_addr, .hash_we, .hash_wr_head, .hash_valid, .hash_head);

  assign sim_rd_addr = e_rd_addr;
  assign sim_wr_en   = busy ? e_wr_en   : tb_wr_en;
  assign sim_wr_addr = busy ? e_wr_addr : tb_wr_addr;
  assign sim_wr_data = busy ? e_wr_data : tb_wr_data;
  assign mem_addr    = busy ? e_mem_addr : tb_mem_addr;

  pn_simulator #(.N(N), .M(M), .TOKEN_BITS(TB), .PRE(PRE_R[M*N-1:0]), .POST(POST_R[M*N-1:0]))
    u_sim (.clk, .rst_n, .step(sim_step), .clear_fired(sim_clear_fired), .clear_err(sim_clear_err),
           .rd_addr(sim_rd_addr), .rd_data(sim_rd_data), .wr_en(sim_wr_en), .wr_addr(sim_wr_addr),
           .wr_data(sim_wr_data), .dct_out, .overflow(sim_overflow), .t_fire);
  state_memory #(.DEPTH(DEPTH)) u_mem (.clk, .addr(mem_addr), .we(mem_we && busy),
                                       .wdata(mem_wdata), .rdata(mem_rdata));
  hash_table #(.HASH_BITS(HB)) u_hash (.clk, .rst_n, .clear(hash_clear), .addr(hash_addr),
    .rd_valid(hash_valid), .rd_head(hash_head), .we(hash_we), .wr_head(hash_wr_head));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Phase length monitor.
  phase_e prev = PH_IDLE;
  int len = 0;
  int bucket [8];
  longint unsigned rd_state;
  int hcode_tb;
  int n_phase [16];
  always @(posedge clk) if (rst_n) begin
    if (phase == PH_READ) rd_state[32*e_rd_addr +: 32] = sim_rd_data;
    if (phase != prev) begin
      n_phase[prev]++;
      case (prev)
        PH_FIRE:    check(len == 1, "FIRE takes 1 cycle");
        PH_READ:    check(len == NW32, "READ takes NW32 cycles");
        PH_HASH:    check(len == 1, "HASH takes 1 cycle");
        PH_SEARCH:  check(len <= bucket[hcode_tb] * REC_WORDS, "SEARCH within list bound");
        PH_STORE:   begin check(len == REC_WORDS, "STORE takes REC_WORDS cycles"); bucket[hcode_tb]++; end
        PH_RESTORE: check(len >= 1 && len <= NW32, "RESTORE within NW32");
        default: ;
      endcase
      if (prev == PH_READ) begin
        bit [31:0] acc, prod;
        acc = 0;
        for (int w = 0; w < NW32; w++) acc = {acc[26:0], acc[31:27]} ^ rd_state[32*w +: 32];
        prod = acc * 32'h9E3779B1;
        hcode_tb = int'(prod >> (32 - HB));
      end
      len = 1;
    end else len++;
    prev = phase;
  end

  initial begin
    bit seen [longint unsigned];
    bit stored [longint unsigned];
    longint unsigned recs [$];
    longint arcs;
    bit ovf;
    int nref;
    start = 0; tb_wr_en = 0; tb_wr_addr = 0; tb_wr_data = 0; tb_mem_addr = 0;
    foreach (bucket[i]) bucket[i] = 0;
    foreach (n_phase[i]) n_phase[i] = 0;
    nref = reach(N, M, PRE_R, POST_R, TB, INIT, seen, arcs, ovf);
    $display("reference: %0d states, %0d firings", nref, arcs);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load the initial marking
    for (int w = 0; w < NW32; w++) begin
      @(negedge clk); tb_wr_en = 1; tb_wr_addr = 1'(w); tb_wr_data = INIT[32*w +: 32];
    end
    @(negedge clk); tb_wr_en = 0; start = 1;
    @(negedge clk); start = 0;
    wait (done || err != '0);
    @(negedge clk);
    check(done && err == '0, "run ends done without error");
    check(int'(n_states) == nref, $sformatf("states %0d vs %0d", n_states, nref));
    check(longint'(n_fires) == arcs, $sformatf("firings %0d vs %0d", n_fires, arcs));
    check(longint'(n_dups) == arcs - (nref - 1), "duplicates");
    check(n_passed > 0, "lists with several states walked");
    // read back every record
    for (int r = 0; r < int'(n_states); r++) begin
      rec_hdr_t h;
      longint unsigned st;
      tb_mem_addr = 12'(r * REC_WORDS); #1; h = rec_hdr_t'(mem_rdata);
      tb_mem_addr = 12'(r * REC_WORDS + 1); #1; st = mem_rdata;
      recs.push_back(st);
      check(seen.exists(st), "record is a reachable state");
      check(!stored.exists(st), "record stored once");
      stored[st] = 1;
      check(h.c_flag, "C flag set");
      if (r == 0) check(!h.has_pred && st == INIT, "record 0 is the initial state");
      else check(h.has_pred && int'(h.pred) < r &&
                 is_successor(N, M, PRE_R, POST_R, TB, recs[h.pred], st), "predecessor");
    end
    $display("cycles=%0d passed=%0d", n_cycles, n_passed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
