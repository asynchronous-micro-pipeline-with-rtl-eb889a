// tb_mps_oplogic: checks one iteration of the section's operation logic
// (multiplication by x in GF(2^W) mod POLY) against an integer model:
// double the value and, if it reaches 2^W, subtract (XOR) 2^W + POLY.
// Runs exhaustively for W = 8 and on random values for W = 16.
module tb_mps_oplogic;
  int checks = 0, failures = 0;

  logic [7:0]  x8, y8;
  logic [15:0] x16, y16;

  mps_oplogic #(.W(8),  .POLY(8'h1D))    dut8  (.x(x8),  .y(y8));
  mps_oplogic                            dut16 (.x(x16), .y(y16));

  function automatic int unsigned ref_step(int unsigned x, int unsigned w, int unsigned poly);
    int unsigned d = x * 2;
    if (d >= (1 << w)) d = d ^ ((1 << w) | poly);
    return d;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x8 = 8'(i);
      #1;
      checks++;
      if (32'(y8) != ref_step(i, 8, 'h1D)) begin
        failures++;
        $display("W=8 x=%02h y=%02h expected %02h", x8, y8, ref_step(i, 8, 'h1D));
      end
    end
    for (int i = 0; i < 2000; i++) begin
      x16 = 16'($urandom);
      #1;
      checks++;
      if (32'(y16) != ref_step(32'(x16), 16, 'h1021)) begin
        failures++;
        $display("W=16 x=%04h y=%04h", x16, y16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
