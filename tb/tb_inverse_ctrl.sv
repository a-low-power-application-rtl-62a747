// tb_inverse_ctrl: checks the inverse-transform controller with stand-in
// column and row engines (see ctrl_tb_body.svh): bus handshake, three
// levels of column-then-row passes at levels 2, 1, 0, bus multiplexing and
// the exact cycle count.
module tb_inverse_ctrl;
  localparam bit FWD = 1'b0;
`include "ctrl_tb_body.svh"

  inverse_ctrl dut (
    .clk, .rst, .busgrant_n, .busreq_n, .ready, .done, .level,
    .col_start, .row_start, .col_done, .row_done, .state,
    .col_mem, .row_mem, .col_reg, .row_reg, .mem_req, .reg_req
  );
endmodule
