// Testbench for place: random fire vectors and loads against a counter
// model; checks count, nonempty and the overflow flag, including the
// self-loop case (a transition in both *p and p*).
module tb_place;
  localparam int M  = 4;
  localparam int TB = 4;
  localparam logic [M-1:0] IN_T  = 4'b0011;   // t0, t1 add
  localparam logic [M-1:0] OUT_T = 4'b0110;   // t1, t2 remove (t1: self-loop)

  logic clk = 0, rst_n = 0;
  logic [M-1:0] t_fire;
  logic load;
  logic [TB-1:0] load_val, count;
  logic nonempty, overflow;
  int checks = 0, failures = 0;
  int model, n_ovf = 0, n_self = 0;

  place #(.M(M), .TOKEN_BITS(TB), .IN_T(IN_T), .OUT_T(OUT_T)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: count=%0d model=%0d", what, count, model);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t_fire = '0; load = 0; load_val = '0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(count == 0 && !nonempty, "reset");
    for (int i = 0; i < 3000; i++) begin
      int k;
      bit exp_ovf;
      k = $urandom_range(0, 9);
      load = (k == 0);
      load_val = TB'($urandom);
      t_fire = '0;
      if (k >= 1 && k <= 5) t_fire[0] = 1'b1;
      else if (k == 6) t_fire[1] = 1'b1;
      else if (k == 7 && model > 0) t_fire[2] = 1'b1;
      else if (k == 8) t_fire[3] = 1'b1;
      #1;
      exp_ovf = !load && t_fire[0] && model == 15;
      check(overflow == exp_ovf, "overflow");
      check(nonempty == (model != 0), "nonempty");
      if (exp_ovf) n_ovf++;
      if (t_fire[1]) n_self++;
      @(posedge clk);
      if (load) model = load_val;
      else if (t_fire[0] && model < 15) model++;
      else if (t_fire[2]) model--;
      @(negedge clk);
      check(int'(count) == model, "count");
    end
    check(n_ovf > 0 && n_self > 0, "cases covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
