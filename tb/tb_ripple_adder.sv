// tb_ripple_adder: checks the 9-bit ripple adder exhaustively over both
// operands and the carry-in against integer addition, plus the 8-bit
// instance on random values, and that both read zero while en is low.
//
// The unit is combinational: each vector is applied and the output sampled
// one time step later. Expected values come from plain integer arithmetic
// in the testbench, independent of the gate structure under test. A
// watchdog on a free-running clock ends the run if it ever hangs.
module tb_ripple_adder;
  logic       clk = 1'b0;
  logic       en;
  logic [8:0] a9, b9, s9;
  logic [7:0] a8, b8, s8;
  logic       cin, co9, co8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ripple_adder #(.WIDTH(9)) dut9 (.en, .a(a9), .b(b9), .cin, .sum(s9), .cout(co9));
  ripple_adder #(.WIDTH(8)) dut8 (.en, .a(a8), .b(b8), .cin, .sum(s8), .cout(co8));

  initial begin
    en = 1'b1;
    for (int a = 0; a < 512; a++)
      for (int b = 0; b < 512; b += 3)
        for (int c = 0; c < 2; c++) begin
          a9 = 9'(a); b9 = 9'(b); cin = c[0];
          #1;
          checks++;
          if ({co9, s9} != 10'(a + b + c)) begin
            failures++;
            if (failures < 5) $display("%0d + %0d + %0d = %0d", a, b, c, {co9, s9});
          end
        end
    for (int i = 0; i < 2000; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); cin = 1'($urandom);
      #1;
      checks++;
      if ({co8, s8} != 9'(a8 + b8 + cin)) failures++;
    end
    en = 1'b0;
    a9 = 9'h1ff; b9 = 9'h1ff; a8 = 8'hff; b8 = 8'h01; cin = 1'b1;
    #1;
    checks++;
    if (s9 != '0 || co9 || s8 != '0 || co8) begin failures++; $display("outputs move while disabled"); end
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
