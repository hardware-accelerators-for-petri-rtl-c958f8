// Full-size run of pn_accelerator with every parameter at its default:
// 100 places with 4-bit counters, 100 transitions forming the default ring
// net, 64K x 64-bit state storage, 1024 hash lists. Two tokens start in
// place 0; the reachability set is every way of putting two tokens on the
// ring, C(101,2) = 5050 states, and every state with the tokens on two
// different places has two enabled transitions, the other 100 states one,
// so 10000 firings and 10000 - 5049 duplicates. Every record is read back
// through the host port: two tokens in all, stored once, C flag set, and
// its predecessor one token move away.
module tb_pn_accelerator_full;
  import pn_pkg::*;
  localparam int N = 100, NW32 = 13, REC_WORDS = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, dct_out, host_blocked, we = 0;
  err_t err; phase_e phase;
  logic [31:0] n_states, n_fires, n_dups, n_passed, n_cycles, wdata = 0, rdata;
  logic [3:0] saddr = 0;
  logic [15:0] maddr = 0;
  logic [63:0] mdata;

  pn_accelerator dut (
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

  // Marking of record r as a token count per place.
  task automatic read_rec(int r, output int tok [N], output rec_hdr_t h);
    logic [63:0] w;
    maddr = 16'(r * REC_WORDS); #1; h = rec_hdr_t'(mdata);
    for (int p = 0; p < N; p++) begin
      maddr = 16'(r * REC_WORDS + 1 + p / 16); #1; w = mdata;
      tok[p] = int'(w[(p % 16)*4 +: 4]);
    end
  endtask

  initial begin
    bit seen [int];
    int key [$];
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
    check(n_states == 5050, $sformatf("states %0d", n_states));
    check(n_fires == 10000, $sformatf("firings %0d", n_fires));
    check(n_dups == 10000 - 5049, "duplicates");
    for (int r = 0; r < int'(n_states); r++) begin
      int tok [N];
      int a, b, sum, k;
      rec_hdr_t h;
      read_rec(r, tok, h);
      sum = 0; a = -1; b = -1;
      for (int p = 0; p < N; p++) begin
        sum += tok[p];
        if (tok[p] > 0 && a < 0) a = p;
        if (tok[p] > 0) b = p;
      end
      check(sum == 2, "two tokens");
      k = a * N + b;
      check(!seen.exists(k), "stored once");
      seen[k] = 1;
      key.push_back(k);
      check(h.c_flag, "C flag");
      if (r == 0) check(k == 0 && !h.has_pred, "record 0");
      else begin
        // predecessor: one token one place back
        int pa, pb, ok;
        pa = key[h.pred] / N; pb = key[h.pred] % N;
        ok = (((pa + 1) % N == a || (pa + 1) % N == b) && (pb == a || pb == b)) ||
             (((pb + 1) % N == a || (pb + 1) % N == b) && (pa == a || pa == b));
        check(h.has_pred && int'(h.pred) < r && ok != 0, "predecessor");
      end
    end
    $display("%0d states, %0d firings, %0d cycles, %0d cycles per firing, %0d list records passed",
             n_states, n_fires, n_cycles, n_cycles / n_fires, n_passed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
