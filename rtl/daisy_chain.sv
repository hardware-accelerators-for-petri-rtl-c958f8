// Daisy chain of transitions (DCT).
//
// All M transition cells are chained in index order. The input of the
// first stage is tied to the active (high) level; the output of the last
// stage goes to the simulation control. While that output is low some
// transition is fireable, and a "step" strobe fires exactly the first one
// in chain order. When it is high, every transition enabled in the state
// now in the simulator has fired since the last "clear" (or none was
// enabled). Chain order, tie-off and the meaning of the output follow the
// source design.
//
// Interface: nonempty is the zero-logic vector of all places; t_fire is the
// one-hot vector of the transition firing in this cycle (all zero when step
// is low or nothing is fireable). The chain is purely combinational; the
// firing flip-flops change on the clock edge.
module daisy_chain #(
  parameter int             M   = 100,
  parameter int             N   = 100,
  parameter logic [M*N-1:0] PRE = '0     // PRE[t*N+p]: p is an input place of t
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] nonempty,
  input  logic         step,
  input  logic         clear,
  output logic [M-1:0] t_fire,
  output logic [M-1:0] t_enabled,
  output logic         dct_out
);

  logic [M:0] chain;

  assign chain[0] = 1'b1;

  for (genvar t = 0; t < M; t++) begin : g_t
    transition #(
      .N    (N),
      .PRE_P(PRE[t*N +: N])
    ) u_t (
      .clk     (clk),
      .rst_n   (rst_n),
      .nonempty(nonempty),
      .step    (step),
      .clear   (clear),
      .dc_in   (chain[t]),
      .dc_out  (chain[t+1]),
      .fire    (t_fire[t]),
      .enabled (t_enabled[t]),
      .fired   ()
    );
  end

  assign dct_out = chain[M];

endmodule
