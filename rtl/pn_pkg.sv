// Shared types and constants of the Petri-net reachability accelerator.
//
// The accelerator explores the reachability set of a bounded Petri net by
// emulating the net directly in logic (one counter per place, one small cell
// per transition) and keeping the states it finds in a hashed state storage.
// This package holds what more than one module needs: the word widths of the
// simulator port (32 bit) and of the state storage (64 bit), the layout of
// the header word that starts each stored state record, the phases of the
// simulation control, and the functions that build the default net used
// when no net is given (a ring: transition t moves a token from place
// t mod N to place (t+1) mod N).
//
// Nets are passed to the hardware as two flattened incidence matrices of
// M*N bits: PRE[t*N+p] is set when place p is an input place of transition
// t, POST[t*N+p] when p is an output place. Arc multiplicity is one.
package pn_pkg;

  // Words moved per cycle: 32 bits to/from the simulator, 64 bits to/from
  // the state storage.
  localparam int SIM_WORD_BITS = 32;
  localparam int MEM_WORD_BITS = 64;

  // Width of a record pointer in the state storage.
  localparam int REC_W = 16;

  // Largest net the default-net functions can describe (M*N bits).
  localparam int MAX_NET_BITS = 65536;

  // Header word at the start of every stored record.
  typedef struct packed {
    logic             c_flag;    // state completed: all successors generated
    logic             has_next;  // another record follows in this hash list
    logic             has_pred;  // pred is valid (false for the initial state)
    logic [28:0]      rsvd;
    logic [REC_W-1:0] pred;      // record this state was first reached from
    logic [REC_W-1:0] next;      // next record with the same hash code
  } rec_hdr_t;

  // Phases of the simulation control (one per row of the step cost table,
  // plus the bookkeeping phases).
  typedef enum logic [3:0] {
    PH_IDLE     = 4'd0,
    PH_FIRE     = 4'd1,   // fire the first firable transition
    PH_READ     = 4'd2,   // read the new state out of the simulator
    PH_HASH     = 4'd3,   // access the hash pointer table
    PH_SEARCH   = 4'd4,   // walk the list of the hash code
    PH_STORE    = 4'd5,   // append the new state to the state storage
    PH_RESTORE  = 4'd6,   // write the expanded state back into the simulator
    PH_COMPLETE = 4'd7,   // set the C flag of the expanded state
    PH_CHOOSE   = 4'd8,   // find the next state without C flag
    PH_LOAD     = 4'd9,   // load that state into the simulator
    PH_DONE     = 4'd10,
    PH_ERROR    = 4'd11
  } phase_e;

  // Error causes reported by the engine.
  typedef struct packed {
    logic token_overflow;   // a place counter would pass its bound
    logic storage_full;     // no room for another record
  } err_t;

  // Default net: a ring of places. Transition t takes from place t mod N.
  function automatic logic [MAX_NET_BITS-1:0] ring_pre(int m, int n);
    logic [MAX_NET_BITS-1:0] r;
    r = '0;
    for (int t = 0; t < m; t++) r[t*n + (t % n)] = 1'b1;
    return r;
  endfunction

  // Default net: transition t puts a token into place (t+1) mod N.
  function automatic logic [MAX_NET_BITS-1:0] ring_post(int m, int n);
    logic [MAX_NET_BITS-1:0] r;
    r = '0;
    for (int t = 0; t < m; t++) r[t*n + ((t + 1) % n)] = 1'b1;
    return r;
  endfunction

endpackage
