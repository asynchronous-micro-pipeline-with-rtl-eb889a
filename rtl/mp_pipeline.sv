// mp_pipeline: asynchronous micro-pipeline built from N multi-stage sections.
//
// Sections MPS_1 .. MPS_N are chained by their data buses; each has its own
// memory (register file), so there are no pipeline registers between them.
// Between every two neighbours sits a control automaton (ca) that reads the
// upstream section's Ready and the downstream section's Free and Busy, starts
// the downstream section with Go and acknowledges the upstream one. Two more
// automata sit at the ends: automaton 0 between the data source and MPS_1,
// automaton N between MPS_N and the data sink. Source and sink are outside
// the pipeline and speak the same protocol as a section:
//   source: presents in_data with in_r high (its "Ready"); the pipeline has
//           taken the data when in_ack has gone low and high again; in_r
//           should fall once in_ack has gone low.
//   sink  : reports out_f (Free) and out_b (Busy); out_go rises when out_data
//           is valid and the sink is Free; the sink must read out_data and
//           raise out_b (dropping out_f) to end the transfer.
// There is no global clock: each section runs on its own local clock from
// clk_sec[k-1], and all handshakes are asynchronous. rst forces every section
// Free and every automaton to S0.
//
// Each section k computes data * x^ITERS[k-1] in GF(2^W) mod POLY, so the
// pipeline output is in_data * x^(sum of ITERS). The chain structure, the
// automata at every boundary and the signals follow the original design; the
// number of sections (four, as drawn in the original figure), the widths,
// the computation and the iteration counts are this design's choices.
module mp_pipeline #(
  parameter int unsigned           N       = 4,
  parameter int unsigned           W       = 16,
  parameter logic [W-1:0]          POLY    = 16'h1021,
  parameter int unsigned           ITERS [N] = '{4, 9, 3, 6},
  parameter mp_pkg::sync_variant_e VARIANT = mp_pkg::SYNC_B
) (
  input  logic         rst,
  input  logic [N-1:0] clk_sec,     // local clocks, one per section
  // source side (plays the part of section 0)
  input  logic         in_r,        // R_0: source data valid
  input  logic [W-1:0] in_data,
  output logic         in_ack,      // A_0
  // sink side (plays the part of section N+1)
  input  logic         out_f,       // F_N+1
  input  logic         out_b,       // B_N+1
  output logic         out_go,      // G_N+1
  output logic [W-1:0] out_data,
  // observation
  output mp_pkg::ss_t  sec_ss  [N], // F, B, R of each section
  output logic [N-1:0] sec_en,      // Enable of each section
  output logic [N:0]   ca_go,       // Go of each automaton (0 .. N)
  output logic [N:0]   ca_ack       // Acknowledgement of each automaton
);

  logic [W-1:0] bus [N+1];  // bus[0] = in_data, bus[k] = DataOut of MPS_k
  logic [N:0]   r_v;            // Ready, index 0: source, 1..N: sections
  logic [N+1:1] f_v, b_v;       // Free/Busy, 1..N: sections, N+1: sink

  assign bus[0] = in_data;
  assign r_v[0] = in_r;
  assign f_v[N+1] = out_f;
  assign b_v[N+1] = out_b;

  for (genvar k = 0; k <= N; k++) begin : g_ca
    ca u_ca (
      .rst      (rst),
      .r_prev   (r_v[k]),
      .f_next   (f_v[k+1]),
      .b_next   (b_v[k+1]),
      .go_next  (ca_go[k]),
      .ack_prev (ca_ack[k])
    );
  end

  for (genvar k = 1; k <= N; k++) begin : g_sec
    mps #(
      .W       (W),
      .ITERS   (ITERS[k-1]),
      .POLY    (POLY),
      .VARIANT (VARIANT)
    ) u_mps (
      .clk      (clk_sec[k-1]),
      .rst      (rst),
      .go       (ca_go[k-1]),
      .ack      (ca_ack[k]),
      .data_in  (bus[k-1]),
      .data_out (bus[k]),
      .ss       (sec_ss[k-1]),
      .enable   (sec_en[k-1])
    );
    assign r_v[k] = sec_ss[k-1].r;
    assign f_v[k] = sec_ss[k-1].f;
    assign b_v[k] = sec_ss[k-1].b;
  end

  assign in_ack   = ca_ack[0];
  assign out_go   = ca_go[N];
  assign out_data = bus[N];

endmodule
