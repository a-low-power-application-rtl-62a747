// tb_carry_select_adder: checks the 19-bit carry-select adder against
// integer addition on random operands and on carry chains that cross every
// slice boundary, plus an instance with uneven slices, and that the output
// is zero while en is low.
//
// The unit is combinational: each vector is applied and the output sampled
// one time step later. Expected values come from plain integer arithmetic
// in the testbench, independent of the gate structure under test. A
// watchdog on a free-running clock ends the run if it ever hangs.
module tb_carry_select_adder;
  logic        clk = 1'b0;
  logic        en, cin, co, co5;
  logic [18:0] a, b, s, s5;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  carry_select_adder #(.WIDTH(19)) dut (.en, .a, .b, .cin, .sum(s), .cout(co));
  carry_select_adder #(.WIDTH(19), .BLOCK(5)) dut5 (.en, .a, .b, .cin, .sum(s5), .cout(co5));

  task automatic check();
    logic [19:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 20'(cin);
    checks++;
    if ({co, s} != exp || {co5, s5} != exp) begin
      failures++;
      if (failures < 5) $display("%h + %h + %b = %h / %h, expected %h", a, b, cin, {co, s}, {co5, s5}, exp);
    end
  endtask

  initial begin
    en = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      a = 19'($urandom); b = 19'($urandom); cin = 1'($urandom);
      check();
    end
    for (int k = 0; k < 19; k++) begin
      a = 19'((1 << k) - 1); b = 19'd1; cin = 1'b0; check();
      a = '1; b = 19'(1 << k); cin = 1'b1; check();
    end
    en = 1'b0;
    a = 19'h12345; b = 19'h54321; cin = 1'b1;
    #1;
    checks++;
    if (s != '0 || co) begin failures++; $display("output moves while disabled"); end
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
