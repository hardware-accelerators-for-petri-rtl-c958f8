// State storage memory: the large memory that holds the reachability set.
//
// In the source design this is the accelerator board's SRAM (128K words of
// 32 bits), and the analysis assumes 64 bits are accessed per cycle; here it
// is the same 4 Mbit seen as DEPTH words of 64 bits. Like an asynchronous
// SRAM it has a single address: the read data follow the address in the
// same cycle (combinational read), and a write (we high) takes effect on
// the rising clock edge. The contents are not reset; the engine reads only
// words it has written.
module state_memory
  import pn_pkg::*;
#(
  parameter int DEPTH = 65536,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic [AW-1:0]            addr,
  input  logic                     we,
  input  logic [MEM_WORD_BITS-1:0] wdata,
  output logic [MEM_WORD_BITS-1:0] rdata
);

  logic [MEM_WORD_BITS-1:0] mem [DEPTH];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

endmodule
