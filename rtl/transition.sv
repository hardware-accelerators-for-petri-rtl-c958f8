// One transition of the emulated Petri net, with its stage of the daisy
// chain.
//
// The cell follows the transition cell of the source design: enabling logic
// (every input place is non-empty), a firing flip-flop remembering that the
// transition has already fired from the state now in the simulator, the
// fireable logic, and the daisy-chain stage. The chain carries an active
// high level. A transition is fireable when it is enabled, has not fired yet
// and sees the active level on dc_in; a fireable transition holds dc_out
// low, every other transition passes dc_in through. So only the first
// fireable transition of the chain can fire, and the chain output stays
// high only when nothing is left to fire.
//
// "step" is the firing strobe of the controller: in a step cycle the
// fireable transition drives "fire" high (to its input and output places)
// and sets its firing flip-flop on the clock edge. "clear" resets the flip-
// flop when a new state is loaded. A transition with no input place is
// always enabled.
module transition #(
  parameter int           N     = 100,  // places in the net
  parameter logic [N-1:0] PRE_P = '0    // input places (*t)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] nonempty,   // zero logic outputs of all places
  input  logic         step,
  input  logic         clear,
  input  logic         dc_in,
  output logic         dc_out,
  output logic         fire,
  output logic         enabled,
  output logic         fired
);

  logic fireable;

  assign enabled  = &(nonempty | ~PRE_P);
  assign fireable = dc_in && enabled && !fired;
  assign dc_out   = dc_in && !(enabled && !fired);
  assign fire     = fireable && step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     fired <= 1'b0;
    else if (clear) fired <= 1'b0;
    else if (fire)  fired <= 1'b1;
  end

endmodule
