// Testbench for host_interface: random host and engine requests; checks
// that the engine owns both ports while busy, the host otherwise, that the
// host can never write the storage, and the host_blocked flag.
module tb_host_interface;
  localparam int SAW = 4, MAW = 16;
  logic engine_busy;
  logic host_sim_we, eng_sim_wr_en, eng_mem_we, sim_wr_en, mem_we, host_blocked;
  logic [SAW-1:0] host_sim_addr, eng_sim_rd_addr, eng_sim_wr_addr, sim_rd_addr, sim_wr_addr;
  logic [31:0] host_sim_wdata, host_sim_rdata, eng_sim_wr_data, sim_rd_data, sim_wr_data;
  logic [MAW-1:0] host_mem_addr, eng_mem_addr, mem_addr;
  logic [63:0] host_mem_rdata, eng_mem_wdata, mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  host_interface #(.SAW(SAW), .MAW(MAW)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s busy=%b", what, engine_busy); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      engine_busy = $urandom_range(0, 1) == 1;
      host_sim_we = $urandom_range(0, 1) == 1;  host_sim_addr = SAW'($urandom);
      host_sim_wdata = $urandom;                host_mem_addr = MAW'($urandom);
      eng_sim_rd_addr = SAW'($urandom);         eng_sim_wr_en = $urandom_range(0, 1) == 1;
      eng_sim_wr_addr = SAW'($urandom);         eng_sim_wr_data = $urandom;
      eng_mem_addr = MAW'($urandom);            eng_mem_we = $urandom_range(0, 1) == 1;
      eng_mem_wdata = {$urandom, $urandom};
      sim_rd_data = $urandom;                   mem_rdata = {$urandom, $urandom};
      #1;
      check(host_sim_rdata == sim_rd_data && host_mem_rdata == mem_rdata, "read data");
      check(host_blocked == (engine_busy && host_sim_we), "blocked");
      if (engine_busy) begin
        check(sim_rd_addr == eng_sim_rd_addr && sim_wr_en == eng_sim_wr_en &&
              sim_wr_addr == eng_sim_wr_addr && sim_wr_data == eng_sim_wr_data, "engine sim");
        check(mem_addr == eng_mem_addr && mem_we == eng_mem_we && mem_wdata == eng_mem_wdata,
              "engine mem");
      end else begin
        check(sim_rd_addr == host_sim_addr && sim_wr_en == host_sim_we &&
              sim_wr_addr == host_sim_addr && sim_wr_data == host_sim_wdata, "host sim");
        check(mem_addr == host_mem_addr && !mem_we, "host mem");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
