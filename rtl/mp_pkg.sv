// mp_pkg: types shared by the blocks of the asynchronous micro-pipeline with
// multi-stage sections.
//
// A multi-stage section is always in exactly one of three states, Free, Busy
// or Ready, and announces that state to its neighbours on three status wires
// F, B and R. The state is kept one-hot so that each status wire is the
// output of its own flip-flop and cannot glitch when the state changes; the
// one-hot encoding is a choice of this design. The synchronizer that turns
// the asynchronous Go into a clocked Enable comes in the two variants A and B
// of the original circuit; sync_variant_e selects between them.
package mp_pkg;

  // Section state, one-hot: bit 0 Free, bit 1 Busy, bit 2 Ready.
  typedef enum logic [2:0] {
    ST_FREE  = 3'b001,
    ST_BUSY  = 3'b010,
    ST_READY = 3'b100
  } sec_state_e;

  // Status signals (SS) a section sends to its control automata.
  // f and b go back to the automaton on the section's input side,
  // r goes forward to the automaton on its output side.
  typedef struct packed {
    logic f;  // Free
    logic b;  // Busy
    logic r;  // Ready (result valid on DataOut, not yet taken)
  } ss_t;

  // Synchronizer variant: A gives Enable straight from the flip-flop,
  // B gates the flip-flop output with Go.
  typedef enum logic {
    SYNC_A = 1'b0,
    SYNC_B = 1'b1
  } sync_variant_e;

endpackage
