// ca: control automaton between two neighbouring multi-stage sections.
//
// The automaton has two states. In S0 it holds Acknowledgement (A_k) high
// towards the upstream section k; in S1 it holds Go (G_k+1) high towards the
// downstream section k+1. It moves S0 -> S1 when section k is Ready and
// section k+1 is Free at the same time (R_k & F_k+1), and back S1 -> S0 when
// section k+1 reports Busy (B_k+1), i.e. when it has taken the data and
// started. Reset forces S0.
//
// As in the original circuit the automaton is a single asynchronous RS latch
// (Moore structure): set = R_k & F_k+1, reset = B_k+1 | Reset, reset has
// priority. Go is the latch's true output and Acknowledgement its inverted
// output. The latch is intended: it is the whole automaton, there is no clock,
// and the latch warning a linter gives for this module stands for that reason.
// Set and reset are never active together in operation, since F and B of one
// section are exclusive.
//
// Together with the sections this realises a 4-phase handshake:
// R_k up -> Go up, A_k down -> B_k+1 up -> Go down, A_k up -> R_k down.
module ca (
  input  logic rst,       // global reset, forces S0
  input  logic r_prev,    // R_k   : upstream section is Ready
  input  logic f_next,    // F_k+1 : downstream section is Free
  input  logic b_next,    // B_k+1 : downstream section is Busy
  output logic go_next,   // G_k+1 : start the downstream section
  output logic ack_prev   // A_k   : acknowledgement to the upstream section
);

  logic s_l;  // latch set
  logic r_l;  // latch reset
  logic q;    // 1 = S1, 0 = S0

  assign s_l = r_prev & f_next;
  assign r_l = rst | b_next;

  always_latch begin
    if (r_l)      q = 1'b0;
    else if (s_l) q = 1'b1;
  end

  assign go_next  = q;
  assign ack_prev = ~q;

endmodule
