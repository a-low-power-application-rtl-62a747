// tb_compare10: checks the greater-or-equal comparator against the integer
// comparison for every pair of 10-bit operands.
//
// The unit is combinational: each vector is applied and the output sampled
// one time step later. Expected values come from plain integer arithmetic
// in the testbench, independent of the gate structure under test. A
// watchdog on a free-running clock ends the run if it ever hangs.
module tb_compare10;
  logic       clk = 1'b0;
  logic [9:0] a, b;
  logic       ge;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  compare10 dut (.a, .b, .ge);

  initial begin
    for (int x = 0; x < 1024; x++)
      for (int y = 0; y < 1024; y++) begin
        a = 10'(x); b = 10'(y);
        #1;
        checks++;
        if (ge != (x >= y)) begin
          failures++;
          if (failures < 5) $display("%0d >= %0d gave %b", x, y, ge);
        end
      end
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
