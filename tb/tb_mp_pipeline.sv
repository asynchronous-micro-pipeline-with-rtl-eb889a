// tb_mp_pipeline: end-to-end test of the whole micro-pipeline at its default
// size (four sections, 16-bit data, iteration counts 4, 9, 3, 6, synchronizer
// variant B). Each section runs on its own free-running clock with a
// different, unrelated period. An asynchronous data source and a data sink
// speak the section protocol at the two ends, with random pauses, so that
// every automaton sees both orders of arrival.
//
// Checked: every accepted operand comes out exactly once, in order, as
// operand * x^22 in GF(2^16) mod 0x1021 (22 = sum of the iteration counts);
// no section is ever in two states; after a reset in the middle of traffic
// every section is Free and every automaton in S0, and traffic resumes.
// Counted, and a failure if never seen:
//   wait_for_data  - an automaton fired because its upstream side became
//                    Ready while the downstream side was already Free
//                    (left half of the switching diagram),
//   wait_for_free  - it fired because the downstream side became Free while
//                    the upstream side was already Ready (right half),
//                    both for every automaton between two sections;
//   back_pressure  - the last section Ready while the sink is Busy;
//   starvation     - the first section Free with no data offered;
//   short_s1       - an automaton's S1 phase shorter than the upstream
//                    section's clock period (caught by the capture flip-flop);
//   enables        - Enable pulses, which must equal the loads;
//   mid_reset      - the reset in the middle of traffic.
module tb_mp_pipeline;
  timeunit 1ns;
  timeprecision 10ps;

  localparam int N = 4;
  localparam int W = 16;
  localparam logic [W-1:0] POLY = 16'h1021;
  localparam int TOTAL_ITERS = 4 + 9 + 3 + 6;
  localparam real HALF [N] = '{5.0, 2.3, 7.3, 3.1};

  int checks = 0, failures = 0;
  logic seen_reset = 0;  // power-up values before the first reset are not counted
  always @(posedge rst) seen_reset = 1;

  logic         rst = 0;
  logic [N-1:0] clk_sec = '0;
  logic         in_r = 0, in_ack;
  logic [W-1:0] in_data = '0;
  logic         out_f = 1, out_b = 0, out_go;
  logic [W-1:0] out_data;
  mp_pkg::ss_t  sec_ss [N];
  logic [N-1:0] sec_en;
  logic [N:0]   ca_go, ca_ack;

  mp_pipeline dut (.*);

  for (genvar k = 0; k < N; k++) begin : g_clk
    initial begin
      #(HALF[k] * 0.37 * (k + 1));
      forever #(HALF[k]) clk_sec[k] = ~clk_sec[k];
    end
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%t: %s", $realtime, what);
    end
  endtask

  function automatic logic [W-1:0] model(logic [W-1:0] a);
    logic [W:0] t;
    for (int i = 0; i < TOTAL_ITERS; i++) begin
      t = {a, 1'b0};
      if (t[W]) t = t ^ {1'b1, POLY};
      a = t[W-1:0];
    end
    return a;
  endfunction

  // ------------------------------------------------------------------
  // Mechanism counters
  // ------------------------------------------------------------------
  int wait_for_data [N+1];
  int wait_for_free [N+1];
  int back_pressure = 0, starvation = 0, short_s1 = 0, enables = 0, loads = 0;
  int mid_reset = 0;
  logic [N:0] r_side, f_side, b_side;
  realtime t_r [N+1], t_f [N+1], t_s1 [N+1];

  always_comb begin
    r_side[0] = in_r;
    for (int k = 1; k <= N; k++) r_side[k] = sec_ss[k-1].r;
    for (int k = 0; k < N; k++)  f_side[k] = sec_ss[k].f;
    f_side[N] = out_f;
    for (int k = 0; k < N; k++)  b_side[k] = sec_ss[k].b;
    b_side[N] = out_b;
  end

  for (genvar k = 0; k <= N; k++) begin : g_mon
    always @(posedge r_side[k]) t_r[k] = $realtime;
    always @(posedge f_side[k]) t_f[k] = $realtime;
    // an automaton is never asked to set while its reset (B) is active
    always @(posedge (r_side[k] & f_side[k])) begin
      checks++;
      if (seen_reset && !rst && b_side[k]) begin
        failures++;
        $display("%t: automaton %0d set while B is high", $realtime, k);
      end
    end
    always @(posedge ca_go[k]) begin
      t_s1[k] = $realtime;
      if (t_r[k] >= t_f[k]) wait_for_data[k]++;
      else                  wait_for_free[k]++;
    end
    if (k >= 1) begin : g_short
      always @(negedge ca_go[k])
        if (!rst && ($realtime - t_s1[k]) < 2.0 * HALF[k-1]) short_s1++;
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_sec_mon
    always @(posedge sec_en[k]) if (seen_reset && !rst) enables++;
    always @(posedge clk_sec[k]) begin
      if (!rst) begin
        checks++;
        if ((32'(sec_ss[k].f) + 32'(sec_ss[k].b) + 32'(dut.g_sec[k+1].u_mps.u_ctrl.state[2])) != 1) begin
          failures++;
          $display("%t: section %0d not in exactly one state", $realtime, k + 1);
        end
        if (dut.g_sec[k+1].u_mps.load) loads++;
      end
    end
  end

  always @(posedge clk_sec[N-1])
    if (!rst && sec_ss[N-1].r && out_b) back_pressure++;
  always @(posedge clk_sec[0])
    if (!rst && sec_ss[0].f && !in_r) starvation++;

  // ------------------------------------------------------------------
  // Source and sink
  // ------------------------------------------------------------------
  logic [W-1:0] expected [$];
  int sent = 0, received = 0;
  int to_send = 0;
  int sink_slow = 0;  // percent of transfers after which the sink stalls long

  initial begin : source
    forever begin
      wait (to_send > 0 && !rst);
      in_data = W'($urandom);
      in_r = 1;
      wait (!in_ack || rst);
      if (!rst) begin
        // automaton 0 in S1: data accepted, Ready withdrawn as a section does
        expected.push_back(in_data);
        sent++;
        to_send--;
        #0.05 in_r = 0;
        wait (in_ack || rst);
      end
      in_r = 0;
      if (($urandom % 10) == 0) #($urandom % 300);
      else                      #($urandom % 6);
    end
  end

  initial begin : sink
    wait (rst);
    wait (!rst);
    forever begin
      wait (out_go === 1'b1);
      if (!rst) begin
        received++;
        checks++;
        if (expected.size() == 0) begin
          failures++;
          $display("%t: unexpected output %h", $realtime, out_data);
        end else begin
          logic [W-1:0] a;
          a = expected.pop_front();
          if (out_data !== model(a)) begin
            failures++;
            $display("%t: output %h expected %h (operand %h)", $realtime, out_data, model(a), a);
          end
        end
      end
      #($urandom % 3 + 0.1);
      out_f = 0;
      out_b = 1;
      wait (out_go === 1'b0);
      if (($urandom % 100) < sink_slow) #($urandom % 400 + 50);
      else                              #($urandom % 4);
      out_b = 0;
      out_f = 1;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog: sent=%0d received=%0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drain(int limit_ns);
    realtime t0 = $realtime;
    while ((to_send > 0 || received < sent) && ($realtime - t0) < limit_ns) #10;
    check(to_send == 0 && received == sent,
          $sformatf("drained: sent=%0d received=%0d left=%0d", sent, received, to_send));
  endtask

  initial begin
    #1 rst = 1;
    #30;
    check(sec_ss[0].f && sec_ss[1].f && sec_ss[2].f && sec_ss[3].f, "all Free in reset");
    check(ca_go == '0 && ca_ack == '1, "all automata in S0 in reset");
    rst = 0;

    // phase 1: fast sink, traffic limited by the sections
    sink_slow = 0;
    to_send = 300;
    drain(200000);

    // phase 2: sink that often stalls, back-pressure through the chain
    sink_slow = 30;
    to_send = 300;
    drain(2000000);

    // phase 3: reset in the middle of traffic
    sink_slow = 10;
    to_send = 40;
    wait (sec_ss[2].b && sec_ss[0].b);
    #3 rst = 1;
    mid_reset++;
    #0.5;
    check(sec_ss[0].f && sec_ss[1].f && sec_ss[2].f && sec_ss[3].f,
          "all sections Free after mid-traffic reset");
    check(ca_go == '0 && ca_ack == '1, "all automata in S0 after mid-traffic reset");
    #40;
    expected.delete();
    to_send = 0;
    received = 0;
    sent = 0;
    wait (out_f);
    #20 rst = 0;

    // phase 4: traffic resumes after the reset
    sink_slow = 5;
    to_send = 200;
    drain(2000000);

    $display("wait_for_data=%p", wait_for_data);
    $display("wait_for_free=%p", wait_for_free);
    $display("back_pressure=%0d starvation=%0d short_s1=%0d enables=%0d loads=%0d mid_reset=%0d",
             back_pressure, starvation, short_s1, enables, loads, mid_reset);
    for (int k = 1; k < N; k++) begin
      check(wait_for_data[k] > 0, $sformatf("automaton %0d never waited for data", k));
      check(wait_for_free[k] > 0, $sformatf("automaton %0d never waited for a free section", k));
    end
    check(wait_for_data[0] > 0 && wait_for_data[N] > 0, "end automata waited for data");
    check(wait_for_free[0] > 0 && wait_for_free[N] > 0, "end automata waited for free");
    check(back_pressure > 0, "back pressure never happened");
    check(starvation > 0, "starvation never happened");
    check(short_s1 > 0, "no short S1 phase");
    check(enables == loads, $sformatf("enables %0d vs loads %0d", enables, loads));
    check(mid_reset == 1, "mid-traffic reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
