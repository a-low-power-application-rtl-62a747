// tb_incby10: checks the increment-by-ten unit against integer addition for
// every input below 4096, on random 19-bit inputs and at the wrap-around,
// and that it reads zero while en is low.
//
// The unit is combinational: each vector is applied and the output sampled
// one time step later. Expected values come from plain integer arithmetic
// in the testbench, independent of the gate structure under test. A
// watchdog on a free-running clock ends the run if it ever hangs.
module tb_incby10;
  logic        clk = 1'b0;
  logic        en;
  logic [18:0] a, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  incby10 dut (.en, .a, .y);

  initial begin
    en = 1'b1;
    for (int i = 0; i < 4096 + 5000; i++) begin
      a = (i < 4096) ? 19'(i) : (i == 4096) ? '1 : 19'($urandom);
      #1;
      checks++;
      if (y != 19'(a + 19'd10)) begin
        failures++;
        if (failures < 5) $display("incby10(%0d) = %0d", a, y);
      end
    end
    en = 1'b0;
    a = 19'd100;
    #1;
    checks++;
    if (y != '0) begin failures++; $display("output moves while disabled"); end
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
