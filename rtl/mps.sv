// mps: one multi-stage micro-pipeline section.
//
// The section computes iteratively with internal feedback: its register file
// feeds the operation logic, whose result goes back into the register file on
// every cycle of the section's local clock while the section is Busy. The
// internal control sequences Free -> Busy -> Ready -> Free and talks to the
// two neighbouring control automata through the status signals F, B, R and
// the control signals Go (from the upstream automaton) and Acknowledgement
// (from the downstream one). The synchronizer, part of every section, turns
// the asynchronous Go into the clocked start pulse Enable.
//
// Timing, in local clock cycles: Go is caught on the first rising edge that
// sees it (Enable rises), the next edge loads DataIn and enters Busy, ITERS
// edges later the section is Ready with DataOut = DataIn * x^ITERS in
// GF(2^W) mod POLY. DataOut is the register file and is valid while R is
// high (and until the section is started again); DataIn is only read on the
// load edge. The structure follows the original section (register file,
// operation logic, control, synchronizer); the computation and the widths
// are this design's choice. The local clock itself is an input.
module mps #(
  parameter int unsigned          W       = 16,
  parameter int unsigned          ITERS   = 4,
  parameter logic [W-1:0]         POLY    = 16'h1021,
  parameter mp_pkg::sync_variant_e VARIANT = mp_pkg::SYNC_B
) (
  input  logic         clk,        // local clock
  input  logic         rst,        // asynchronous, active high, forces Free
  input  logic         go,         // G_k  from the upstream automaton
  input  logic         ack,        // A_k  from the downstream automaton
  input  logic [W-1:0] data_in,    // DataIn
  output logic [W-1:0] data_out,   // DataOut
  output mp_pkg::ss_t  ss,         // F_k, B_k, R_k
  output logic         enable      // start pulse (for observation)
);

  logic         load, step;
  logic [W-1:0] next;

  synchronizer #(.VARIANT(VARIANT)) u_sync (
    .clk    (clk),
    .rst    (rst),
    .go     (go),
    .busy   (ss.b),
    .enable (enable)
  );

  mps_control #(.ITERS(ITERS)) u_ctrl (
    .clk    (clk),
    .rst    (rst),
    .enable (enable),
    .ack    (ack),
    .ss     (ss),
    .load   (load),
    .step   (step)
  );

  mps_regfile #(.W(W)) u_rf (
    .clk     (clk),
    .rst     (rst),
    .load    (load),
    .step    (step),
    .data_in (data_in),
    .next    (next),
    .q       (data_out)
  );

  mps_oplogic #(.W(W), .POLY(POLY)) u_op (
    .x (data_out),
    .y (next)
  );

endmodule
