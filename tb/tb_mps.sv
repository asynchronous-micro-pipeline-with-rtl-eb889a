// tb_mps: one multi-stage section (W = 16, ITERS = 7) between two emulated
// control automata. The upstream side raises Go at random moments when the
// section is Free and drops it when the section reports Busy; the downstream
// side takes the result after a random delay by pulling Acknowledgement low
// and then high again. Checked for every operand: the result equals
// operand * x^7 in GF(2^16) mod 0x1021 (computed here by a bitwise model);
// the start takes exactly two clock edges from Go (one to catch Go, one to
// load); Busy lasts exactly ITERS cycles; DataOut is stable while Ready;
// the section returns to Free within one cycle of the acknowledgement.
module tb_mps;
  timeunit 1ns;
  timeprecision 100ps;
  localparam int W = 16;
  localparam int ITERS = 7;
  localparam logic [W-1:0] POLY = 16'h1021;

  int checks = 0, failures = 0;

  logic clk = 0, rst = 0, go = 0, ack = 1, enable;
  logic [W-1:0] data_in = '0, data_out;
  mp_pkg::ss_t ss;

  mps #(.W(W), .ITERS(ITERS), .POLY(POLY)) dut (.*);

  always #5 clk = ~clk;

  int edges;  // rising clock edges counted by the timing checks
  always @(posedge clk) edges++;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%t: %s", $realtime, what);
    end
  endtask

  function automatic logic [W-1:0] model(logic [W-1:0] a, int n);
    logic [W:0] t;
    for (int i = 0; i < n; i++) begin
      t = {a, 1'b0};
      if (t[W]) t = t ^ {1'b1, POLY};
      a = t[W-1:0];
    end
    return a;
  endfunction

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #0.5 rst = 1;
    #0.5 check(ss.f && !ss.b && !ss.r, "free after reset");
    #20 rst = 0;
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] a;
      int e0, e1;
      a = W'($urandom);
      @(posedge clk);
      #(0.5 + ($urandom % 90) / 10.0);
      data_in = a;
      go = 1;
      e0 = edges;
      wait (ss.b);
      e1 = edges;
      check(e1 - e0 == 2, $sformatf("start took %0d edges", e1 - e0));
      #0.2 go = 0;
      data_in = ~a;  // bus no longer matters
      wait (ss.r);
      check(edges - e1 == ITERS, $sformatf("busy for %0d cycles", edges - e1));
      check(data_out == model(a, ITERS),
            $sformatf("result %h expected %h for %h", data_out, model(a, ITERS), a));
      repeat ($urandom % 4) begin
        @(posedge clk);
        #0.1 check(ss.r && data_out == model(a, ITERS), "result held while ready");
      end
      #($urandom % 7 + 0.3) ack = 0;
      #0.1 check(!ss.r, "ready withdrawn in S1");
      #($urandom % 23 + 0.3) ack = 1;
      e0 = edges;
      wait (ss.f);
      check(edges - e0 == 1, "free on next edge after acknowledgement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
