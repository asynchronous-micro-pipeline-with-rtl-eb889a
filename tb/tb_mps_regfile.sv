// tb_mps_regfile: drives random load/step commands into the section register
// file and compares its content every cycle with a model (load wins over
// step, otherwise hold). Also checks the asynchronous reset.
module tb_mps_regfile;
  localparam int W = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 0, load = 0, step = 0;
  logic [W-1:0] data_in = '0, next = '0, q, model;

  mps_regfile #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #1 rst = 1;
    #11 rst = 0;
    checks++;
    if (q !== '0) begin failures++; $display("reset value %h", q); end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load    = ($urandom % 4) == 0;
      step    = ($urandom % 2) == 0;
      data_in = W'($urandom);
      next    = W'($urandom);
      @(posedge clk);
      if (load)      model = data_in;
      else if (step) model = next;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("cycle %0d: q=%h expected %h", i, q, model);
      end
    end
    // asynchronous reset between edges
    @(negedge clk);
    rst = 1;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("async reset failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
