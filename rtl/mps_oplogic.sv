// mps_oplogic: the operation logic of a multi-stage section, i.e. one step of
// the section's iterative computation. It is purely combinational; the
// section's register file feeds it and takes its result back on every local
// clock cycle while the section is Busy, which forms the internal feedback
// loop of the section.
//
// The original work leaves the computation open (any cyclic algorithm). This
// design uses one step of a Galois LFSR, i.e. multiplication by x in GF(2^W)
// modulo the polynomial POLY: shift left by one and, if the bit shifted out
// was 1, XOR with POLY. ITERS steps multiply the section's input by x^ITERS.
// It is cheap, has no carry chain and gives a result that a testbench can
// check independently.
module mps_oplogic #(
  parameter int unsigned     W    = 16,
  parameter logic [W-1:0]    POLY = 16'h1021   // CRC-16-CCITT polynomial
) (
  input  logic [W-1:0] x,   // current register file content
  output logic [W-1:0] y    // value after one iteration
);

  always_comb begin
    y = {x[W-2:0], 1'b0};
    if (x[W-1]) y = y ^ POLY;
  end

endmodule
