// Testbench for transition: random place states, chain input, strobes and
// clears against a model of the enabling logic, the firing flip-flop and
// the daisy-chain stage.
module tb_transition;
  localparam int N = 4;
  localparam logic [N-1:0] PRE_P = 4'b0101;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] nonempty;
  logic step, clear, dc_in, dc_out, fire, enabled, fired;
  int checks = 0, failures = 0;
  bit mfired;
  int n_fire = 0, n_block = 0;

  transition #(.N(N), .PRE_P(PRE_P)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nonempty = '0; step = 0; clear = 0; dc_in = 0; mfired = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      bit en, fa;
      @(negedge clk);
      nonempty = N'($urandom);
      step  = $urandom_range(0, 1);
      clear = ($urandom_range(0, 7) == 0);
      dc_in = ($urandom_range(0, 3) != 0);
      #1;
      en = nonempty[0] && nonempty[2];
      fa = en && !mfired && dc_in;
      check(enabled == en, "enabled");
      check(fired == mfired, "fired");
      check(fire == (fa && step), "fire");
      check(dc_out == (dc_in && !(en && !mfired)), "dc_out");
      if (fa && step) n_fire++;
      if (dc_in && !dc_out) n_block++;
      @(posedge clk);
      if (clear) mfired = 0;
      else if (fa && step) mfired = 1;
    end
    check(n_fire > 0 && n_block > 0, "cases covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
