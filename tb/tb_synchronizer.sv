// tb_synchronizer: checks both synchronizer variants side by side.
// Go is raised at random moments that are not aligned with the clock; Enable
// must rise on the first rising clock edge after Go (not before), stay high
// until the emulated section answers with Busy on the next edge, be cleared
// by Busy and stay low for the whole Busy phase. A second test removes Go
// before Busy arrives: variant B must drop Enable with Go, variant A must
// keep it until Busy clears the flip-flop.
module tb_synchronizer;
  timeunit 1ns;
  timeprecision 100ps;

  int checks = 0, failures = 0;
  int enables = 0;

  logic clk = 0, rst = 0, go = 0, busy = 0;
  logic en_a, en_b;

  synchronizer #(.VARIANT(mp_pkg::SYNC_A)) dut_a (.clk, .rst, .go, .busy, .enable(en_a));
  synchronizer #(.VARIANT(mp_pkg::SYNC_B)) dut_b (.clk, .rst, .go, .busy, .enable(en_b));

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%t: %s (en_a=%b en_b=%b go=%b busy=%b)", $realtime, what, en_a, en_b, go, busy);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #0.5 rst = 1;
    #0.5 check(!en_a && !en_b, "enable low in reset");
    #20 rst = 0;
    for (int i = 0; i < 200; i++) begin
      // Go at a random, non-aligned moment
      @(posedge clk);
      #(0.3 + ($urandom % 96) / 10.0);
      go = 1;
      #0.1 check(!en_a && !en_b, "enable before a clock edge");
      @(posedge clk);
      #0.1 check(en_a && en_b, "enable on first edge after go");
      enables++;
      if (i % 4 == 3) begin
        // Go withdrawn before the section started
        #2 go = 0;
        #0.1 check(en_a && !en_b, "variant B follows go, variant A holds");
        @(posedge clk);
        #0.1 busy = 1;
        #0.1 check(!en_a && !en_b, "busy clears");
      end else begin
        // section samples enable on the next edge and becomes busy
        @(posedge clk);
        #0.1 busy = 1;
        #0.1 check(!en_a && !en_b, "busy clears enable");
        #1 go = 0;
      end
      repeat ($urandom % 5 + 1) begin
        @(posedge clk);
        #0.1 check(!en_a && !en_b, "enable low while busy");
      end
      // Go may already be back while busy (next request): still no enable
      if (i % 3 == 0) begin
        go = 1;
        @(posedge clk);
        #0.1 check(!en_a && !en_b, "busy holds flip-flop clear against go");
        go = 0;
      end
      busy = 0;
    end
    check(enables == 200, "every go produced an enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
