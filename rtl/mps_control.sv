// mps_control: internal control of a multi-stage section.
//
// It steps the section through Free -> Busy -> Ready -> Free and drives the
// status signals F, B and R that the control automata on either side read.
//   Free : waiting for a start. On a rising local clock edge with Enable high
//          it loads DataIn into the register file and enters Busy.
//   Busy : one iteration per local clock cycle, ITERS cycles in all; the edge
//          that performs the last iteration enters Ready. DataIn is ignored.
//   Ready: the result is held on DataOut. When the downstream automaton has
//          passed through S1 (its Acknowledgement went low) and is back in S0
//          (Acknowledgement high again), the data has been taken, and the next
//          local clock edge enters Free. This is the rule "Free follows Ready
//          together with Acknowledgement".
// Reset forces Free.
//
// The low phase of Acknowledgement is captured by a flip-flop with an
// asynchronous set ("taken"), so that it is not missed even when the local
// clock is slower than the downstream handshake. R is Ready with taken low:
// it drops the moment the downstream automaton enters S1, so the automaton
// cannot start the downstream section a second time on the same data. taken
// is cleared only when new data is loaded, which keeps R free of glitches at
// the Ready -> Free edge. The capture flip-flop and this form of R are choices
// of this design; the original states only the order of the states and that
// Free follows Ready and Acknowledgement.
//
// Acknowledgement is used both as the asynchronous set of "taken" and as a
// level sampled by the local clock; a linter reports this mixed use, and it
// stands, because it is how a slow local clock is made to see a short S1 phase.
//
// Timing: load is a combinational output (Free & Enable) used at the same
// edge; F and B are flip-flop outputs. ITERS >= 1.
module mps_control #(
  parameter int unsigned ITERS = 4   // iterations per computation
) (
  input  logic clk,      // local clock
  input  logic rst,      // asynchronous, active high, forces Free
  input  logic enable,   // start pulse from the synchronizer
  input  logic ack,      // A_k from the downstream control automaton
  output mp_pkg::ss_t ss,  // status signals F, B, R
  output logic load,     // register file: take DataIn
  output logic step      // register file: take one iteration
);

  import mp_pkg::*;

  localparam int unsigned CW = (ITERS > 1) ? $clog2(ITERS) : 1;

  sec_state_e      state;
  logic [CW-1:0]   cnt;
  logic            taken;

  assign load = (state == ST_FREE) && enable;
  assign step = (state == ST_BUSY);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= ST_FREE;
      cnt   <= '0;
    end else begin
      unique case (state)
        ST_FREE: begin
          if (enable) begin
            state <= ST_BUSY;
            cnt   <= '0;
          end
        end
        ST_BUSY: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(ITERS - 1)) state <= ST_READY;
        end
        ST_READY: begin
          if (taken && ack) state <= ST_FREE;
        end
        default: state <= ST_FREE;
      endcase
    end
  end

  // Capture of the downstream automaton's S1 phase (Acknowledgement low).
  // It needs no reset: it is only read in Ready, and every way into Ready
  // passes through a load, which clears it.
  always_ff @(posedge clk or negedge ack) begin
    if (!ack)      taken <= 1'b1;
    else if (load) taken <= 1'b0;
  end

  assign ss.f = state[0];
  assign ss.b = state[1];
  assign ss.r = state[2] & ~taken;

  // Acknowledgement can only be low after this section offered data.
  property p_ack_low_only_when_ready;
    @(posedge clk) !ack |-> state == ST_READY;
  endproperty
  assert property (p_ack_low_only_when_ready)
    else $error("mps_control: acknowledgement low outside Ready");

endmodule
