// One place of the emulated Petri net.
//
// A place is a token counter with two pieces of logic around it: the
// up/down enabling logic, which watches the fire signals of the transitions
// in the place's pre-set (*p, they add a token) and post-set (p*, they take
// one), and the zero logic, whose "nonempty" output feeds the enabling logic
// of every transition in p*. This is the structure of the place cell in the
// source design; the counter width, the load port and the overflow output
// are this implementation's choices.
//
// At most one transition fires per clock, so the counter steps by at most
// one. A transition that is in both *p and p* (a self-loop) leaves the count
// unchanged. Counting up from the largest value (2**TOKEN_BITS-1) is refused
// and flagged on "overflow" in that cycle: the net is not bounded by the
// counter width. "load" (from the simulator's word port) has priority over
// counting and sets the counter to load_val on the next edge.
//
// Timing: count and nonempty change on the rising clock edge after a fire
// or load; nonempty and overflow are combinational from the count.
module place #(
  parameter int           M          = 100,  // transitions in the net
  parameter int           TOKEN_BITS = 4,    // counter width (bound 2**TOKEN_BITS-1)
  parameter logic [M-1:0] IN_T       = '0,   // transitions of *p
  parameter logic [M-1:0] OUT_T      = '0    // transitions of p*
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [M-1:0]          t_fire,     // one-hot (or zero) fire vector
  input  logic                  load,
  input  logic [TOKEN_BITS-1:0] load_val,
  output logic [TOKEN_BITS-1:0] count,
  output logic                  nonempty,
  output logic                  overflow
);

  logic up, down;

  // Enabling logic: one input per arc.
  assign up   = |(t_fire & IN_T);
  assign down = |(t_fire & OUT_T);

  assign nonempty = (count != '0);
  assign overflow = up && !down && (count == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    count <= '0;
    else if (load)                 count <= load_val;
    else if (up && !down && !overflow) count <= count + 1'b1;
    else if (down && !up)          count <= count - 1'b1;
  end

endmodule
