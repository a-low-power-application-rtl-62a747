// tb_quantizer: checks the quantize/threshold rules. First the worked
// examples of the chip's test set (value before -> after the rules, per
// quadrant and level), then every 8-bit input under every rule against the
// reference (round toward zero to a multiple of 2**K, then clamp), and that
// the output is zero while en is low.
module tb_quantizer;
  import wavelet_pkg::*;
  import haar_ref_pkg::*;

  logic   clk = 1'b0;
  logic   en;
  qrule_t rule;
  pixel_t x, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  quantizer dut (.en, .rule, .x, .y);

  task automatic expect_q(input qrule_t r, input int v, input int e);
    rule = r;
    x    = pixel_t'(v);
    #1;
    checks++;
    if (int'(y) != e) begin
      failures++;
      $display("rule %0d: %0d -> %0d, expected %0d", r, v, y, e);
    end
  endtask

  initial begin
    en = 1'b1;
    // level 0, lower-left / upper-right band (rule 5)
    expect_q(Q5, -20, -8); expect_q(Q5, -9, -8); expect_q(Q5, -3, 0);
    expect_q(Q5, 5, 0);    expect_q(Q5, 17, 8);
    // level 0, lower-right band (rule 6)
    expect_q(Q6, -24, -8); expect_q(Q6, -8, 0); expect_q(Q6, -1, 0); expect_q(Q6, 7, 0);
    // level 1, lower-left / upper-right band (rule 3)
    expect_q(Q3, -82, -64); expect_q(Q3, -65, -64); expect_q(Q3, -21, -20);
    expect_q(Q3, 5, 4);     expect_q(Q3, 101, 64);
    // level 1, lower-right band (rule 4)
    expect_q(Q4, -65, -64); expect_q(Q4, -63, -56); expect_q(Q4, -7, 0); expect_q(Q4, 12, 8);
    // level 2 (rules 1 and 2)
    expect_q(Q1, -82, -82); expect_q(Q1, -65, -64); expect_q(Q1, -21, -20); expect_q(Q1, 5, 4);
    expect_q(Q2, -65, -64); expect_q(Q2, -63, -60); expect_q(Q2, -7, -4);
    // scaling coefficients pass unchanged
    expect_q(Q0, -77, -77); expect_q(Q0, 127, 127);
    // exhaustive
    for (int r = 0; r < 7; r++)
      for (int v = -128; v < 128; v++) begin
        rule = qrule_t'(r);
        x    = pixel_t'(v);
        #1;
        checks++;
        if (int'(y) != quant(v, r)) begin
          failures++;
          if (failures < 10) $display("rule %0d: %0d -> %0d, expected %0d", r, v, y, quant(v, r));
        end
      end
    en = 1'b0;
    rule = Q6; x = -8'sd77;
    #1;
    checks++;
    if (y != '0) begin failures++; $display("output moves while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
