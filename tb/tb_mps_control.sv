// tb_mps_control: checks the section control sequencing with ITERS = 5.
// A clocked driver gives one-cycle Enable pulses and plays the downstream
// automaton with Acknowledgement (low for a random time, then high).
// Checked: Free/Busy/Ready are one-hot; load comes exactly with Enable in Free;
// Busy lasts exactly ITERS cycles with step high; Ready then holds until the
// acknowledgement has gone low and high again; R drops as soon as
// Acknowledgement goes low, even between clock edges; Enable is ignored
// while Busy or Ready; reset forces Free.
module tb_mps_control;
  timeunit 1ns;
  timeprecision 100ps;
  localparam int ITERS = 5;

  int checks = 0, failures = 0;

  logic clk = 0, rst = 0, enable = 0, ack = 1;
  mp_pkg::ss_t ss;
  logic load, step;

  mps_control #(.ITERS(ITERS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%t: %s (f=%b b=%b r=%b load=%b step=%b)", $realtime, what,
               ss.f, ss.b, ss.r, load, step);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    if (!rst) check($onehot({ss.f, ss.b, dut.state[2]}), "state one-hot");

  initial begin
    #0.5 rst = 1;
    #0.5 check(ss.f && !ss.b && !ss.r, "free in reset");
    #20 rst = 0;
    for (int n = 0; n < 100; n++) begin
      int busy_cycles;
      // idle a little in Free
      repeat ($urandom % 3) begin
        @(negedge clk);
        check(ss.f && !load && !step, "free waits");
      end
      @(negedge clk);
      enable = 1;
      #0.1 check(load, "load with enable in free");
      @(posedge clk);
      #0.1 enable = 0;
      busy_cycles = 0;
      while (ss.b) begin
        check(step && !load, "step during busy");
        // a stray enable during busy must be ignored
        if (busy_cycles == 1) enable = 1;
        @(posedge clk);
        #0.1;
        enable = 0;
        busy_cycles++;
        if (busy_cycles > 50) break;
      end
      check(busy_cycles == ITERS, $sformatf("busy for %0d cycles", busy_cycles));
      check(ss.r && !ss.f, "ready after busy");
      // downstream not yet taking the data
      repeat ($urandom % 4) begin
        @(posedge clk);
        #0.1 check(ss.r, "ready holds without acknowledgement");
      end
      // downstream automaton enters S1: Acknowledgement low (between edges)
      #1.3 ack = 0;
      #0.1 check(!ss.r, "R drops when acknowledgement goes low");
      repeat ($urandom % 3) begin
        @(posedge clk);
        #0.1 check(!ss.f && !ss.b, "still in ready while acknowledgement low");
      end
      #0.4 ack = 1;
      @(posedge clk);
      #0.1 check(ss.f, "free after acknowledgement returned");
      if (n % 10 == 9) begin
        // reset in the middle of a computation
        @(negedge clk) enable = 1;
        @(negedge clk) enable = 0;
        #1 rst = 1;
        #0.1 check(ss.f && !ss.b, "reset forces free");
        #10 rst = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
