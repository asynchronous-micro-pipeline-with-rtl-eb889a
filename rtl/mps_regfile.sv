// mps_regfile: the register file of a multi-stage section, its own memory.
//
// One W-bit register. On load it takes DataIn (the previous section's result),
// on step it takes the operation logic's result (the internal feedback), and
// otherwise it holds, so once the section is Ready its content is the result
// presented on DataOut until the next section has taken it. Because the
// register file holds the data, the pipeline needs no pipeline registers
// between sections. Load has priority over step; in operation the two are
// never active together. A single register is this design's choice (the
// original allows one or more). Timing: both updates take effect on the
// rising edge of the section's local clock; reset clears the register.
module mps_regfile #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,       // asynchronous, active high
  input  logic         load,      // take data_in
  input  logic         step,      // take next (one iteration)
  input  logic [W-1:0] data_in,   // DataIn bus
  input  logic [W-1:0] next,      // operation logic result
  output logic [W-1:0] q          // register content, drives DataOut
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       q <= '0;
    else if (load) q <= data_in;
    else if (step) q <= next;
  end

endmodule
