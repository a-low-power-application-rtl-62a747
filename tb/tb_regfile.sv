// tb_regfile: checks the 256 x 8 register file. Fills every location with
// a distinct pattern through the write decoders and reads it back through
// the read decoders, overwrites in a second pattern, checks that addresses
// 256 and up neither store nor read anything and that the read bus is zero
// when no read is enabled, and checks random write/read traffic against a
// shadow array.
module tb_regfile;
  import wavelet_pkg::*;

  logic       clk = 1'b0;
  logic       en, we;
  logic [9:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] shadow [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  regfile dut (.clk, .en, .we, .addr, .wdata, .rdata);

  task automatic wr(input int a, input logic [7:0] d);
    @(negedge clk);
    en = 1'b1; we = 1'b1; addr = 10'(a); wdata = d;
    @(posedge clk);
    #1 en = 1'b0; we = 1'b0;
    if (a < 256) shadow[a] = d;
  endtask

  task automatic rd_check(input int a);
    logic [7:0] e;
    @(negedge clk);
    en = 1'b1; we = 1'b0; addr = 10'(a);
    #1;
    e = (a < 256) ? shadow[a] : 8'h00;
    checks++;
    if (rdata !== e) begin
      failures++;
      if (failures < 8) $display("read %0d = %h, expected %h", a, rdata, e);
    end
    en = 1'b0;
  endtask

  initial begin
    en = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < 256; i++) wr(i, 8'(i * 37 + 5));
    for (int i = 0; i < 256; i++) rd_check(i);
    for (int i = 255; i >= 0; i--) wr(i, ~8'(i));
    for (int i = 0; i < 256; i++) rd_check(i);
    // out-of-range addresses
    wr(256 + 3, 8'hEE);
    wr(512 + 7, 8'hEE);
    for (int i = 0; i < 16; i++) rd_check(i);
    rd_check(259);
    rd_check(1023);
    // idle bus
    @(negedge clk);
    en = 1'b0; addr = 10'd5;
    #1;
    checks++;
    if (rdata !== 8'h00) begin failures++; $display("read bus not idle"); end
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 1)) wr($urandom_range(0, 255), 8'($urandom));
      else rd_check($urandom_range(0, 255));
    end
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
