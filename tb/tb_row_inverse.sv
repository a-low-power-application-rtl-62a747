// tb_row_inverse: self-checking test of row_inverse, the inverse transform of the rows,
// on a 32 x 32 image at levels 0, 1 and 2 (32, 16 and 8 pixel lines).
// The engine runs on the RAM model and the register file; results and cycle
// counts are compared with the reference model (see engine_tb_body.svh).
module tb_row_inverse;
  localparam int IMG  = 32;
  localparam int KIND = 3;

  `include "engine_tb_body.svh"

  row_inverse #(.IMG(IMG)) dut (
    .clk, .rst, .start, .level, .done, .busy, .state, .mem_req, .mem_rdata, .reg_req, .reg_rdata
  );
endmodule
