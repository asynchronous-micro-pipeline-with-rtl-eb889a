// synchronizer: turns the asynchronous Go of a control automaton into the
// start pulse Enable of a multi-stage section, synchronous with the section's
// local clock.
//
// A rising-edge D flip-flop samples Go. The first rising clock edge that sees
// Go high sets the flip-flop and Enable rises; if Go rises too late for one
// edge it is taken by the next. The section samples Enable on the following
// edge, enters Busy, and Busy clears the flip-flop through its asynchronous,
// dominant Clear input, so Enable lasts at most one clock period and stays
// low for the whole computation. Busy also removes Go (through the control
// automaton). For reliable capture Go must stay high for at least one clock
// period plus one clock pulse (t_Go >= T + t1), which the handshake ensures,
// because Go only falls once the section is Busy.
//
// Variant A takes Enable straight from the flip-flop. Variant B gates the
// flip-flop output with Go, so the fall of Go itself ends Enable. Both
// variants, and the Busy-driven Clear, follow the original circuit; adding
// the global reset to the Clear, so that Enable is low after power-up, is a
// choice of this design.
module synchronizer #(
  parameter mp_pkg::sync_variant_e VARIANT = mp_pkg::SYNC_B
) (
  input  logic clk,     // local clock of the section
  input  logic rst,     // global reset (asynchronous, active high)
  input  logic go,      // Go from the control automaton (asynchronous)
  input  logic busy,    // Busy of the section: clears the flip-flop
  output logic enable   // start pulse, at most one clock period long
);

  logic clr;
  logic q;

  assign clr = busy | rst;

  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= 1'b0;
    else     q <= go;
  end

  assign enable = (VARIANT == mp_pkg::SYNC_B) ? (q & go) : q;

endmodule
