// Testbench for hash_table with 16 entries: random head writes, lookups and
// whole-table clears against a model.
module tb_hash_table;
  localparam int HB = 4;
  logic clk = 0, rst_n = 0;
  logic clear, we, rd_valid;
  logic [HB-1:0] addr;
  logic [15:0] rd_head, wr_head;
  bit          mv [16];
  logic [15:0] mh [16];
  int checks = 0, failures = 0, n_clear = 0;

  hash_table #(.HASH_BITS(HB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; we = 0; addr = 0; wr_head = 0;
    foreach (mv[i]) mv[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      addr = HB'($urandom);
      clear = ($urandom_range(0, 99) == 0);
      we = !clear && ($urandom_range(0, 3) == 0);
      wr_head = 16'($urandom);
      #1;
      checks++;
      if (rd_valid != mv[addr] || (mv[addr] && rd_head != mh[addr])) begin
        failures++;
        $display("FAIL entry %0d", addr);
      end
      @(posedge clk);
      if (clear) begin foreach (mv[k]) mv[k] = 0; n_clear++; end
      else if (we) begin mv[addr] = 1; mh[addr] = wr_head; end
    end
    checks++;
    if (n_clear == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
