// tb_incrementer: checks the 10-bit incrementer exhaustively and the 19-bit
// one on random values and at its wrap-around, and that both read zero
// while en is low.
//
// The unit is combinational: each vector is applied and the output sampled
// one time step later. Expected values come from plain integer arithmetic
// in the testbench, independent of the gate structure under test. A
// watchdog on a free-running clock ends the run if it ever hangs.
module tb_incrementer;
  logic        clk = 1'b0;
  logic        en, co10, co19;
  logic [9:0]  a10, y10;
  logic [18:0] a19, y19;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  incrementer #(.WIDTH(10)) dut10 (.en, .a(a10), .y(y10), .cout(co10));
  incrementer #(.WIDTH(19)) dut19 (.en, .a(a19), .y(y19), .cout(co19));

  initial begin
    en = 1'b1;
    a19 = '0;
    for (int i = 0; i < 1024; i++) begin
      a10 = 10'(i);
      #1;
      checks++;
      if ({co10, y10} != 11'(i + 1)) begin
        failures++;
        if (failures < 5) $display("inc10(%0d) = %0d", i, {co10, y10});
      end
    end
    for (int i = 0; i < 5000; i++) begin
      a19 = (i == 0) ? '1 : 19'($urandom);
      #1;
      checks++;
      if ({co19, y19} != 20'(a19) + 20'd1) failures++;
    end
    en = 1'b0;
    a10 = 10'd7; a19 = 19'd7;
    #1;
    checks++;
    if (y10 != '0 || y19 != '0) begin failures++; $display("output moves while disabled"); end
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
