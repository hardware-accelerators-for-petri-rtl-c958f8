// Hash pointer table of the state storage.
//
// States are kept in one linked list per hash code; this table holds, for
// every hash code, whether its list is empty and the record number of the
// list's head. A lookup is combinational (one cycle of the search, as in
// the step cost table of the design); a write stores a new head and marks
// the entry valid on the clock edge. "clear" empties every list in one
// cycle: the valid bits are flip-flops, the head pointers a plain memory
// array that is never read while invalid. Keeping the lists per hash code
// follows the source design; a single table level, its size and its place
// on chip are this implementation's choices.
module hash_table
  import pn_pkg::*;
#(
  parameter int HASH_BITS = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [HASH_BITS-1:0] addr,
  output logic                 rd_valid,
  output logic [REC_W-1:0]     rd_head,
  input  logic                 we,
  input  logic [REC_W-1:0]     wr_head
);

  localparam int ENTRIES = 1 << HASH_BITS;

  logic [ENTRIES-1:0] valid;
  logic [REC_W-1:0]   head [ENTRIES];

  assign rd_valid = valid[addr];
  assign rd_head  = head[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid <= '0;
    else if (clear) valid <= '0;
    else if (we)    valid[addr] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (we) head[addr] <= wr_head;
  end

endmodule
