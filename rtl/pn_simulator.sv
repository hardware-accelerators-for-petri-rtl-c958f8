// Petri-net simulator: the net itself, emulated in logic.
//
// N place cells and a daisy chain of M transition cells are wired by the
// net's flow relation, given as the incidence parameters PRE and POST (see
// pn_pkg). This is the successor function of the reachability search in
// silicon: one "step" strobe fires the first fireable transition and the
// new marking is in the counters one clock later, i.e. one transition
// firing per clock. The net is fixed at elaboration, as in the source
// design where the net is synthesised for each analysis run; the default
// is a ring of N places.
//
// The marking is accessed through a 32-bit word port, as the source design
// assumes 32 bits per simulator access. Place p sits in word
// p / PLACES_PER_WORD, bits (p % PLACES_PER_WORD)*TOKEN_BITS upward; unused
// bits of the last word read as zero. Reads are combinational (rd_addr to
// rd_data); a write loads the places of one word on the next clock edge.
//
// dct_out is high when no transition is fireable. clear_fired resets all
// firing flip-flops (new state loaded). overflow is sticky: it is set when a
// firing would push a counter past its bound and cleared by clear_err.
module pn_simulator
  import pn_pkg::*;
#(
  parameter int             N          = 100,
  parameter int             M          = 100,
  parameter int             TOKEN_BITS = 4,
  parameter logic [M*N-1:0] PRE        = (M*N)'(ring_pre(M, N)),
  parameter logic [M*N-1:0] POST       = (M*N)'(ring_post(M, N)),
  localparam int PPW  = SIM_WORD_BITS / TOKEN_BITS,     // places per word
  localparam int NW32 = (N + PPW - 1) / PPW,            // words per state
  localparam int AW   = (NW32 > 1) ? $clog2(NW32) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     step,
  input  logic                     clear_fired,
  input  logic                     clear_err,
  input  logic [AW-1:0]            rd_addr,
  output logic [SIM_WORD_BITS-1:0] rd_data,
  input  logic                     wr_en,
  input  logic [AW-1:0]            wr_addr,
  input  logic [SIM_WORD_BITS-1:0] wr_data,
  output logic                     dct_out,
  output logic                     overflow,
  output logic [M-1:0]             t_fire
);

  logic [N-1:0]                 nonempty;
  logic [N-1:0]                 ovf;
  logic [N-1:0][TOKEN_BITS-1:0] count;
  logic [M-1:0]                 t_enabled;

  // Column p of an incidence matrix: the transitions connected to place p.
  function automatic logic [M-1:0] column(logic [M*N-1:0] mat, int p);
    logic [M-1:0] c;
    for (int t = 0; t < M; t++) c[t] = mat[t*N + p];
    return c;
  endfunction

  for (genvar p = 0; p < N; p++) begin : g_p
    place #(
      .M         (M),
      .TOKEN_BITS(TOKEN_BITS),
      .IN_T      (column(POST, p)),
      .OUT_T     (column(PRE, p))
    ) u_p (
      .clk     (clk),
      .rst_n   (rst_n),
      .t_fire  (t_fire),
      .load    (wr_en && (wr_addr == AW'(p / PPW))),
      .load_val(wr_data[(p % PPW)*TOKEN_BITS +: TOKEN_BITS]),
      .count   (count[p]),
      .nonempty(nonempty[p]),
      .overflow(ovf[p])
    );
  end

  daisy_chain #(
    .M  (M),
    .N  (N),
    .PRE(PRE)
  ) u_dct (
    .clk      (clk),
    .rst_n    (rst_n),
    .nonempty (nonempty),
    .step     (step),
    .clear    (clear_fired),
    .t_fire   (t_fire),
    .t_enabled(t_enabled),
    .dct_out  (dct_out)
  );

  // Word read port.
  always_comb begin
    rd_data = '0;
    for (int p = 0; p < N; p++)
      if (rd_addr == AW'(p / PPW))
        rd_data[(p % PPW)*TOKEN_BITS +: TOKEN_BITS] = count[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         overflow <= 1'b0;
    else if (clear_err) overflow <= 1'b0;
    else if (|ovf)      overflow <= 1'b1;
  end

  // The daisy chain lets at most one transition fire per clock.
  a_one_fire: assert property (@(posedge clk) disable iff (!rst_n)
    (t_fire & (t_fire - 1'b1)) == '0);

endmodule
