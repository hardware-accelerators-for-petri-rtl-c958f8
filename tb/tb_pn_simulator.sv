// Testbench for pn_simulator on a 10-place, 8-transition net with a fork,
// a join, a self-loop and a place that grows without bound. Random loads
// through the word port and firing strobes are checked against the
// software interpreter in pn_ref_pkg: marking words, chain output (first
// fireable transition in index order, firing flip-flops cleared on
// request) and the sticky overflow flag.
module tb_pn_simulator;
  import pn_ref_pkg::*;
  localparam int N = 10, M = 8, TB = 4;

  // net as (transition, inputs, outputs)
  function automatic net_t mk(bit post);
    net_t r = '0;
    // t0: p0 -> p1,p2     t1: p1 -> p3      t2: p2 -> p4   t3: p3,p4 -> p0
    // t4: p5 -> p6        t5: p6 -> p5,p7   t6: p8,p9 -> p9
    // t7: p7 -> p8
    if (!post) begin
      r[0*N+0]=1; r[1*N+1]=1; r[2*N+2]=1; r[3*N+3]=1; r[3*N+4]=1;
      r[4*N+5]=1; r[5*N+6]=1; r[6*N+8]=1; r[6*N+9]=1; r[7*N+7]=1;
    end else begin
      r[0*N+1]=1; r[0*N+2]=1; r[1*N+3]=1; r[2*N+4]=1; r[3*N+0]=1;
      r[4*N+6]=1; r[5*N+5]=1; r[5*N+7]=1; r[6*N+9]=1; r[7*N+8]=1;
    end
    return r;
  endfunction
  localparam net_t PRE_R  = mk(0);
  localparam net_t POST_R = mk(1);

  logic clk = 0, rst_n = 0;
  logic step, clear_fired, clear_err, wr_en, dct_out, overflow;
  logic [0:0] rd_addr, wr_addr;
  logic [31:0] rd_data, wr_data;
  logic [M-1:0] t_fire;
  int checks = 0, failures = 0;
  longint unsigned mk_ref;
  bit [M-1:0] fired_ref;
  bit ovf_ref;
  int n_fire = 0, n_dct = 0, n_ovf = 0, n_join = 0;

  pn_simulator #(.N(N), .M(M), .TOKEN_BITS(TB),
                 .PRE(PRE_R[M*N-1:0]), .POST(POST_R[M*N-1:0])) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s ref=%h", what, mk_ref); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step = 0; clear_fired = 0; clear_err = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    mk_ref = 0; fired_ref = 0; ovf_ref = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      int op, first;
      bit o;
      @(negedge clk);
      step = 0; clear_fired = 0; clear_err = 0; wr_en = 0;
      op = $urandom_range(0, 19);
      if (op == 0) begin
        // load a random small marking word
        wr_en = 1; wr_addr = 1'($urandom_range(0, 1));
        wr_data = 32'($urandom) & 32'h3333_3333;
        if (wr_addr == 1) wr_data &= 32'hff;
      end else if (op == 1) clear_fired = 1;
      else if (op == 2) clear_err = 1;
      else step = 1;
      rd_addr = 1'($urandom_range(0, 1));
      #1;
      // combinational checks against the model
      first = -1;
      for (int t = 0; t < M; t++)
        if (first < 0 && !fired_ref[t] && enabled(N, t, PRE_R, mk_ref, TB)) first = t;
      check(rd_data == 32'(mk_ref >> (32*rd_addr)), "rd_data");
      check(dct_out == (first < 0), "dct_out");
      check(overflow == ovf_ref, "overflow");
      check(t_fire == ((first >= 0 && step) ? (M'(1) << first) : '0), "t_fire");
      @(posedge clk);
      if (wr_en) begin
        if (wr_addr == 0) mk_ref = {mk_ref[63:32], wr_data};
        else mk_ref = {mk_ref[63:40], wr_data[7:0], mk_ref[31:0]};
      end else if (clear_fired) fired_ref = '0;
      if (clear_err) ovf_ref = 0;
      if (step && first >= 0) begin
        longint unsigned nx;
        nx = fire(N, first, PRE_R, POST_R, mk_ref, TB, o);
        if (o) begin ovf_ref = 1; n_ovf++; end
        mk_ref = nx;
        fired_ref[first] = 1;
        n_fire++;
        if (first == 3 || first == 6) n_join++;
      end
      if (first < 0) begin n_dct++; fired_ref = '0; end
      if (first < 0) begin
        // keep the run going: clear the firing flip-flops next cycle
        @(negedge clk);
        step = 0; wr_en = 0; clear_err = 0; clear_fired = 1;
        @(posedge clk);
      end
    end
    check(n_fire > 100 && n_dct > 10 && n_ovf > 0 && n_join > 0, "cases covered");
    $display("fires=%0d chain_done=%0d overflows=%0d joins=%0d", n_fire, n_dct, n_ovf, n_join);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
