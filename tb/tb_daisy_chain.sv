// Testbench for daisy_chain: random place states and strobes; the model
// fires the lowest-numbered enabled transition that has not fired since
// the last clear, and the chain output is high when there is none.
module tb_daisy_chain;
  localparam int M = 6;
  localparam int N = 5;
  // t0:{p0} t1:{p1,p2} t2:{} t3:{p3} t4:{p0,p4} t5:{p2}
  localparam logic [M*N-1:0] PRE = {5'b00100, 5'b10001, 5'b01000, 5'b00000, 5'b00110, 5'b00001};

  logic clk = 0, rst_n = 0;
  logic [N-1:0] nonempty;
  logic step, clear, dct_out;
  logic [M-1:0] t_fire, t_enabled;
  int checks = 0, failures = 0;
  bit [M-1:0] mfired;
  int n_fire = 0, n_done = 0;

  daisy_chain #(.M(M), .N(N), .PRE(PRE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t_fire=%b", what, t_fire); end
  endtask

  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nonempty = '0; step = 0; clear = 0; mfired = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      bit [M-1:0] en, exp_fire;
      int first;
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) nonempty = N'($urandom);
      step  = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 15) == 0);
      #1;
      first = -1;
      for (int t = 0; t < M; t++) begin
        en[t] = 1;
        for (int p = 0; p < N; p++) if (PRE[t*N+p] && !nonempty[p]) en[t] = 0;
        if (first < 0 && en[t] && !mfired[t]) first = t;
      end
      exp_fire = '0;
      if (first >= 0 && step) exp_fire[first] = 1'b1;
      check(t_enabled == en, "enabled");
      check(t_fire == exp_fire, "fire");
      check(dct_out == (first < 0), "dct_out");
      if (first >= 0 && step) n_fire++;
      if (first < 0) n_done++;
      @(posedge clk);
      if (clear) mfired = '0;
      else mfired |= exp_fire;
    end
    check(n_fire > 0 && n_done > 0, "cases covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
