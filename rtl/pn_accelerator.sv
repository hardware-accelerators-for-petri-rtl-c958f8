// Petri-net reachability accelerator, top level.
//
// The accelerator generates the reachability set of a bounded Petri net by
// exhaustive breadth-first simulation. Four blocks make it up: the Petri-
// net simulator (the net emulated in logic, firing one transition per
// clock), the search/compare engine with the simulation control, the state
// storage (a hash pointer table plus a large memory holding the states as
// linked lists per hash code), and the host interface. The simulator hands
// the actual marking to the engine; the engine compares it with the stored
// markings and restores or loads markings back into the simulator.
//
// Use: hold start low, write the initial marking through the host simulator
// port (word w holds places 8w..8w+7 at 4 bits each with the default
// TOKEN_BITS), pulse start for one cycle, wait for done (or err). n_states
// is then the size of the reachability set; record r sits at storage words
// r*REC_WORDS .. r*REC_WORDS+REC_WORDS-1 (a pn_pkg::rec_hdr_t header, then
// the marking, two simulator words per storage word), readable through the
// host storage port.
//
// Defaults: 100 places with 4-bit counters and 64K x 64-bit storage follow
// the figures used in the source design's performance estimate and its
// evaluation board; the transition count, the ring-shaped default net and
// the 1024-entry hash table are this implementation's choices.
module pn_accelerator
  import pn_pkg::*;
#(
  parameter int             N          = 100,
  parameter int             M          = 100,
  parameter int             TOKEN_BITS = 4,
  parameter logic [M*N-1:0] PRE        = (M*N)'(ring_pre(M, N)),
  parameter logic [M*N-1:0] POST       = (M*N)'(ring_post(M, N)),
  parameter int             MEM_DEPTH  = 65536,
  parameter int             HASH_BITS  = 10,
  localparam int PPW  = SIM_WORD_BITS / TOKEN_BITS,
  localparam int NW32 = (N + PPW - 1) / PPW,
  localparam int SAW  = (NW32 > 1) ? $clog2(NW32) : 1,
  localparam int MAW  = $clog2(MEM_DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output err_t                     err,
  output phase_e                   phase,
  output logic [31:0]              n_states,
  output logic [31:0]              n_fires,
  output logic [31:0]              n_dups,
  output logic [31:0]              n_passed,
  output logic [31:0]              n_cycles,
  output logic                     dct_out,
  // host
  input  logic                     host_sim_we,
  input  logic [SAW-1:0]           host_sim_addr,
  input  logic [SIM_WORD_BITS-1:0] host_sim_wdata,
  output logic [SIM_WORD_BITS-1:0] host_sim_rdata,
  input  logic [MAW-1:0]           host_mem_addr,
  output logic [MEM_WORD_BITS-1:0] host_mem_rdata,
  output logic                     host_blocked
);

  // engine <-> interface
  logic                     sim_step, sim_clear_fired, sim_clear_err;
  logic [SAW-1:0]           e_sim_rd_addr, e_sim_wr_addr;
  logic                     e_sim_wr_en;
  logic [SIM_WORD_BITS-1:0] e_sim_wr_data;
  logic [MAW-1:0]           e_mem_addr;
  logic                     e_mem_we;
  logic [MEM_WORD_BITS-1:0] e_mem_wdata;
  // interface <-> simulator / storage
  logic [SAW-1:0]           sim_rd_addr, sim_wr_addr;
  logic                     sim_wr_en;
  logic [SIM_WORD_BITS-1:0] sim_rd_data, sim_wr_data;
  logic                     sim_overflow;
  logic [M-1:0]             t_fire;
  logic [MAW-1:0]           mem_addr;
  logic                     mem_we;
  logic [MEM_WORD_BITS-1:0] mem_wdata, mem_rdata;
  // hash table
  logic                     hash_clear, hash_we, hash_valid;
  logic [HASH_BITS-1:0]     hash_addr;
  logic [REC_W-1:0]         hash_wr_head, hash_head;

  pn_simulator #(
    .N(N), .M(M), .TOKEN_BITS(TOKEN_BITS), .PRE(PRE), .POST(POST)
  ) u_sim (
    .clk        (clk),
    .rst_n      (rst_n),
    .step       (sim_step),
    .clear_fired(sim_clear_fired),
    .clear_err  (sim_clear_err),
    .rd_addr    (sim_rd_addr),
    .rd_data    (sim_rd_data),
    .wr_en      (sim_wr_en),
    .wr_addr    (sim_wr_addr),
    .wr_data    (sim_wr_data),
    .dct_out    (dct_out),
    .overflow   (sim_overflow),
    .t_fire     (t_fire)
  );

  search_engine #(
    .N(N), .TOKEN_BITS(TOKEN_BITS), .MEM_DEPTH(MEM_DEPTH), .HASH_BITS(HASH_BITS)
  ) u_eng (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (start),
    .busy           (busy),
    .done           (done),
    .err            (err),
    .phase          (phase),
    .n_states       (n_states),
    .n_fires        (n_fires),
    .n_dups         (n_dups),
    .n_passed       (n_passed),
    .n_cycles       (n_cycles),
    .sim_step       (sim_step),
    .sim_clear_fired(sim_clear_fired),
    .sim_clear_err  (sim_clear_err),
    .sim_rd_addr    (e_sim_rd_addr),
    .sim_rd_data    (sim_rd_data),
    .sim_wr_en      (e_sim_wr_en),
    .sim_wr_addr    (e_sim_wr_addr),
    .sim_wr_data    (e_sim_wr_data),
    .sim_dct_out    (dct_out),
    .sim_overflow   (sim_overflow),
    .mem_addr       (e_mem_addr),
    .mem_we         (e_mem_we),
    .mem_wdata      (e_mem_wdata),
    .mem_rdata      (mem_rdata),
    .hash_clear     (hash_clear),
    .hash_addr      (hash_addr),
    .hash_we        (hash_we),
    .hash_wr_head   (hash_wr_head),
    .hash_valid     (hash_valid),
    .hash_head      (hash_head)
  );

  host_interface #(.SAW(SAW), .MAW(MAW)) u_host (
    .engine_busy    (busy),
    .host_sim_we    (host_sim_we),
    .host_sim_addr  (host_sim_addr),
    .host_sim_wdata (host_sim_wdata),
    .host_sim_rdata (host_sim_rdata),
    .host_mem_addr  (host_mem_addr),
    .host_mem_rdata (host_mem_rdata),
    .host_blocked   (host_blocked),
    .eng_sim_rd_addr(e_sim_rd_addr),
    .eng_sim_wr_en  (e_sim_wr_en),
    .eng_sim_wr_addr(e_sim_wr_addr),
    .eng_sim_wr_data(e_sim_wr_data),
    .eng_mem_addr   (e_mem_addr),
    .eng_mem_we     (e_mem_we),
    .eng_mem_wdata  (e_mem_wdata),
    .sim_rd_addr    (sim_rd_addr),
    .sim_rd_data    (sim_rd_data),
    .sim_wr_en      (sim_wr_en),
    .sim_wr_addr    (sim_wr_addr),
    .sim_wr_data    (sim_wr_data),
    .mem_addr       (mem_addr),
    .mem_we         (mem_we),
    .mem_wdata      (mem_wdata),
    .mem_rdata      (mem_rdata)
  );

  state_memory #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk  (clk),
    .addr (mem_addr),
    .we   (mem_we),
    .wdata(mem_wdata),
    .rdata(mem_rdata)
  );

  hash_table #(.HASH_BITS(HASH_BITS)) u_hash (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (hash_clear),
    .addr    (hash_addr),
    .rd_valid(hash_valid),
    .rd_head (hash_head),
    .we      (hash_we),
    .wr_head (hash_wr_head)
  );

endmodule
