// Host interface of the accelerator.
//
// The host (a PC on the other side of the board's bus) shares the
// simulator's word port and the state storage with the search engine. While
// the engine is idle, done or stopped on an error, the host owns both: it
// loads an initial marking into the simulator word by word (so a new
// initial state needs no new net), reads the marking back, and reads the
// stored records, i.e. the reachability set and the predecessor pointers.
// While the engine runs, the ports belong to the engine, host writes are
// ignored and "host_blocked" tells the host so. The source design shows
// only that the host reaches both the simulator and the state storage; the
// ownership rule is this implementation's choice.
//
// Everything here is combinational multiplexing; read data reach the host
// in the cycle of the address.
module host_interface
  import pn_pkg::*;
#(
  parameter int SAW = 4,    // simulator word address width
  parameter int MAW = 16    // storage address width
) (
  input  logic                     engine_busy,
  // host side
  input  logic                     host_sim_we,
  input  logic [SAW-1:0]           host_sim_addr,
  input  logic [SIM_WORD_BITS-1:0] host_sim_wdata,
  output logic [SIM_WORD_BITS-1:0] host_sim_rdata,
  input  logic [MAW-1:0]           host_mem_addr,
  output logic [MEM_WORD_BITS-1:0] host_mem_rdata,
  output logic                     host_blocked,
  // engine side
  input  logic [SAW-1:0]           eng_sim_rd_addr,
  input  logic                     eng_sim_wr_en,
  input  logic [SAW-1:0]           eng_sim_wr_addr,
  input  logic [SIM_WORD_BITS-1:0] eng_sim_wr_data,
  input  logic [MAW-1:0]           eng_mem_addr,
  input  logic                     eng_mem_we,
  input  logic [MEM_WORD_BITS-1:0] eng_mem_wdata,
  // simulator word port
  output logic [SAW-1:0]           sim_rd_addr,
  input  logic [SIM_WORD_BITS-1:0] sim_rd_data,
  output logic                     sim_wr_en,
  output logic [SAW-1:0]           sim_wr_addr,
  output logic [SIM_WORD_BITS-1:0] sim_wr_data,
  // state storage port
  output logic [MAW-1:0]           mem_addr,
  output logic                     mem_we,
  output logic [MEM_WORD_BITS-1:0] mem_wdata,
  input  logic [MEM_WORD_BITS-1:0] mem_rdata
);

  always_comb begin
    if (engine_busy) begin
      sim_rd_addr = eng_sim_rd_addr;
      sim_wr_en   = eng_sim_wr_en;
      sim_wr_addr = eng_sim_wr_addr;
      sim_wr_data = eng_sim_wr_data;
      mem_addr    = eng_mem_addr;
      mem_we      = eng_mem_we;
      mem_wdata   = eng_mem_wdata;
    end else begin
      sim_rd_addr = host_sim_addr;
      sim_wr_en   = host_sim_we;
      sim_wr_addr = host_sim_addr;
      sim_wr_data = host_sim_wdata;
      mem_addr    = host_mem_addr;
      mem_we      = 1'b0;
      mem_wdata   = '0;
    end
  end

  assign host_sim_rdata = sim_rd_data;
  assign host_mem_rdata = mem_rdata;
  assign host_blocked   = engine_busy && host_sim_we;

endmodule
