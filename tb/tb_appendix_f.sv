// tb_appendix_f: replays the chip's published column-transform test cases
// for the lower-left band, using a 32 x 32 image stored from word 10.
//
// For each case a handful of RAM words is preset (everything else is zero),
// the row engine and then the column engine run one pass each at the given
// level, and five words in the lower-left band are compared with the
// published end values, which include the quantize/threshold rules:
//   level 0 (rule 5): words 522, 554, 586, 618, 650 -> -8, -8, 0, 0, 8
//   level 1 (rule 3): words 266, 298, 330, 362, 394 -> -64, -64, -20, 4, 64
// The expected values are the published ones, not a model's. The two
// engines share one RAM model and one register file; a phase flag selects
// whose buses reach them, as the top-level controller does.
module tb_appendix_f;
  import wavelet_pkg::*;

  localparam int IMG = 32;

  logic       clk = 1'b0;
  logic       rst;
  logic       row_start, col_start, row_done, col_done, row_busy, col_busy;
  logic       phase_col;
  logic [1:0] level;
  logic [4:0] row_st, col_st;
  mem_req_t   row_mem, col_mem, mem_req;
  reg_req_t   row_reg, col_reg, reg_req;
  logic [7:0] mem_rdata, reg_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign mem_req = phase_col ? col_mem : row_mem;
  assign reg_req = phase_col ? col_reg : row_reg;

  sram_model #(.DEPTH(IMG * IMG + 10 + 16)) ram (
    .clk, .strobe(mem_req.strobe), .rd(mem_req.rd), .addr(mem_req.addr),
    .wdata(mem_req.wdata), .rdata(mem_rdata)
  );

  regfile u_rf (
    .clk, .en(reg_req.en), .we(reg_req.we), .addr(reg_req.addr), .wdata(reg_req.wdata),
    .rdata(reg_rdata)
  );

  row_transform #(.IMG(IMG)) u_row (
    .clk, .rst, .start(row_start), .level, .done(row_done), .busy(row_busy), .state(row_st),
    .mem_req(row_mem), .mem_rdata, .reg_req(row_reg), .reg_rdata
  );

  col_transform #(.IMG(IMG)) u_col (
    .clk, .rst, .start(col_start), .level, .done(col_done), .busy(col_busy), .state(col_st),
    .mem_req(col_mem), .mem_rdata, .reg_req(col_reg), .reg_rdata
  );

  task automatic clear_ram();
    for (int i = 0; i < IMG * IMG + 10 + 16; i++) ram.mem[i] = 8'h00;
  endtask

  task automatic pass(input bit col);
    @(negedge clk);
    phase_col = col;
    if (col) col_start = 1'b1; else row_start = 1'b1;
    @(negedge clk);
    row_start = 1'b0;
    col_start = 1'b0;
    if (col) wait (col_done); else wait (row_done);
    @(negedge clk);
  endtask

  task automatic expect_word(input int addr, input int val);
    checks++;
    if ($signed(ram.mem[addr]) != val) begin
      failures++;
      $display("word %0d = %0d, expected %0d", addr, $signed(ram.mem[addr]), val);
    end
  endtask

  initial begin
    rst = 1'b1; row_start = 1'b0; col_start = 1'b0; phase_col = 1'b0; level = 2'd0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // level 0, lower-left band
    clear_ram();
    ram.mem[43]  = 8'd80;
    ram.mem[107] = 8'd36;
    ram.mem[171] = 8'd12;
    ram.mem[202] = 8'd20;
    ram.mem[266] = 8'd68;
    level = 2'd0;
    pass(1'b0);
    expect_word(42, 40); expect_word(106, 18); expect_word(170, 6);
    expect_word(202, 10); expect_word(266, 34);
    pass(1'b1);
    expect_word(522, -8); expect_word(554, -8); expect_word(586, 0);
    expect_word(618, 0);  expect_word(650, 8);

    // level 1, lower-left band
    clear_ram();
    ram.mem[10]  = -8'sd82;  ram.mem[11]  = -8'sd82;
    ram.mem[42]  = 8'sd82;   ram.mem[43]  = 8'sd82;
    ram.mem[74]  = -8'sd65;  ram.mem[75]  = -8'sd65;
    ram.mem[106] = 8'sd65;   ram.mem[107] = 8'sd65;
    ram.mem[138] = -8'sd21;  ram.mem[139] = -8'sd21;
    ram.mem[170] = 8'sd21;   ram.mem[171] = 8'sd21;
    ram.mem[202] = 8'sd20;
    ram.mem[266] = 8'sd101;  ram.mem[267] = 8'sd101;
    ram.mem[298] = -8'sd101; ram.mem[299] = -8'sd101;
    level = 2'd1;
    pass(1'b0);
    expect_word(10, -82); expect_word(42, 82); expect_word(74, -65);
    expect_word(106, 65); expect_word(202, 10); expect_word(266, 101);
    pass(1'b1);
    expect_word(266, -64); expect_word(298, -64); expect_word(330, -20);
    expect_word(362, 4);   expect_word(394, 64);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
