// tb_transform_ctrl: checks the forward-transform controller with stand-in
// row and column engines (see ctrl_tb_body.svh): bus handshake, three
// levels of row-then-column passes at levels 0, 1, 2, bus multiplexing and
// the exact cycle count.
module tb_transform_ctrl;
  localparam bit FWD = 1'b1;
`include "ctrl_tb_body.svh"

  transform_ctrl dut (
    .clk, .rst, .busgrant_n, .busreq_n, .ready, .done, .level,
    .row_start, .col_start, .row_done, .col_done, .state,
    .row_mem, .col_mem, .row_reg, .col_reg, .mem_req, .reg_req
  );
endmodule
