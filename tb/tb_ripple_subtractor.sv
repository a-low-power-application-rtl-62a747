// tb_ripple_subtractor: checks the 9-bit subtractor exhaustively against
// integer subtraction (difference and borrow), including the sign-extended
// 8-bit pixel differences the Haar butterfly forms, and that the output is
// zero while en is low.
//
// The unit is combinational: each vector is applied and the output sampled
// one time step later. Expected values come from plain integer arithmetic
// in the testbench, independent of the gate structure under test. A
// watchdog on a free-running clock ends the run if it ever hangs.
module tb_ripple_subtractor;
  logic       clk = 1'b0;
  logic       en;
  logic [8:0] a, b, d;
  logic       bo;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ripple_subtractor #(.WIDTH(9)) dut (.en, .a, .b, .diff(d), .borrow(bo));

  initial begin
    en = 1'b1;
    #1;
    for (int x = 0; x < 512; x++)
      for (int y = 0; y < 512; y++) begin
        a = 9'(x); b = 9'(y);
        #1;
        checks++;
        if (d != 9'(x - y) || bo != (x < y)) begin
          failures++;
          if (failures < 5) $display("%0d - %0d = %0d borrow %b", x, y, d, bo);
        end
      end
    // signed pixel pairs: (p - q) fits in 9 bits
    for (int p = -127; p <= 127; p += 7)
      for (int q = -127; q <= 127; q += 5) begin
        a = 9'(p); b = 9'(q);
        #1;
        checks++;
        if ($signed(d) != p - q) failures++;
      end
    en = 1'b0;
    a = 9'd5; b = 9'd3;
    #1;
    checks++;
    if (d != '0) begin failures++; $display("output moves while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
