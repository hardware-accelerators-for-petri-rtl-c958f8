// Testbench for state_memory: random writes and reads over the full default
// depth against an associative-array model; reads are combinational.
module tb_state_memory;
  logic clk = 0;
  logic [15:0] addr;
  logic we;
  logic [63:0] wdata, rdata;
  logic [63:0] model [int];
  int checks = 0, failures = 0;

  state_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      addr  = ($urandom_range(0, 1) == 0) ? 16'($urandom_range(0, 63)) : 16'($urandom);
      we    = $urandom_range(0, 1) == 1;
      wdata = {$urandom, $urandom};
      #1;
      if (model.exists(int'(addr))) begin
        checks++;
        if (rdata != model[int'(addr)]) begin
          failures++;
          $display("FAIL addr %h: %h vs %h", addr, rdata, model[int'(addr)]);
        end
      end
      @(posedge clk);
      if (we) model[int'(addr)] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
