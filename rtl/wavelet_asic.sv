// wavelet_asic: three-level 2-D Haar wavelet transform / inverse transform.
//
// The chip works in place on a signed 8-bit IMG x IMG image stored row by
// row in an external RAM starting at word OFFSET. It has two independent
// halves, chosen by trans_inv:
//   trans_inv = 1  transform: for each of the three levels, transform all
//                  rows then all columns of the current corner, quantizing
//                  and thresholding in the column pass;
//   trans_inv = 0  inverse transform: for each level from the coarsest up,
//                  undo the columns then the rows.
// The half not selected is held in reset. Each half is a top-level
// controller driving a row engine and a column engine; both halves share the
// 256 x 8 register file that holds the half line of coefficients that cannot
// be written back to RAM yet.
//
// Pins (after the chip's pin list): addr/memstrobe/memwrsel (1 = read) and
// the data bus, which is split here into data_in, data_out and data_oe
// (data_oe high while the chip writes); busreq_n / busgrant_n (active low)
// for the board's bus arbiter; ready (waiting for the bus), done (the
// selected half has finished; stays high until reset); state_choice and
// state_out to watch one of the state machines.
//
// Timing: the RAM must return read data on data_in two clock cycles after
// the cycle in which memstrobe is high with memwrsel = 1; a write happens in
// the cycle memstrobe is high with memwrsel = 0. Synchronous active-high
// reset.
module wavelet_asic
  import wavelet_pkg::*;
#(
  parameter int unsigned IMG    = 512,
  parameter int unsigned LEVELS = 3,
  parameter int unsigned OFFSET = IMG_OFFSET
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               trans_inv,
  input  logic [1:0]         state_choice,
  input  logic               busgrant_n,
  output logic               busreq_n,
  output logic               ready,
  output logic               done,
  output logic [ADDR_W-1:0]  addr,
  input  logic [DATA_W-1:0]  data_in,
  output logic [DATA_W-1:0]  data_out,
  output logic               data_oe,
  output logic               memstrobe,
  output logic               memwrsel,
  output logic [STATE_W-1:0] state_out
);
  logic t_rst, i_rst;
  assign t_rst = reset | ~trans_inv;
  assign i_rst = reset |  trans_inv;

  logic [DATA_W-1:0] reg_rdata;

  // ---------------- transform half ----------------
  logic               t_busreq_n, t_ready, t_done;
  logic [1:0]         t_level;
  logic               tr_start, tc_start, tr_done, tc_done, tr_busy, tc_busy;
  logic [STATE_W-1:0] t_top_st, tr_st, tc_st;
  mem_req_t           tr_mem, tc_mem, t_mem;
  reg_req_t           tr_reg, tc_reg, t_reg;

  transform_ctrl #(.LEVELS(LEVELS)) u_tctrl (
    .clk, .rst(t_rst), .busgrant_n, .busreq_n(t_busreq_n), .ready(t_ready),
    .done(t_done), .level(t_level), .row_start(tr_start), .col_start(tc_start),
    .row_done(tr_done), .col_done(tc_done), .state(t_top_st),
    .row_mem(tr_mem), .col_mem(tc_mem), .row_reg(tr_reg), .col_reg(tc_reg),
    .mem_req(t_mem), .reg_req(t_reg)
  );

  row_transform #(.IMG(IMG), .OFFSET(OFFSET)) u_trow (
    .clk, .rst(t_rst), .start(tr_start), .level(t_level), .done(tr_done),
    .busy(tr_busy), .state(tr_st), .mem_req(tr_mem), .mem_rdata(data_in),
    .reg_req(tr_reg), .reg_rdata
  );

  col_transform #(.IMG(IMG), .OFFSET(OFFSET)) u_tcol (
    .clk, .rst(t_rst), .start(tc_start), .level(t_level), .done(tc_done),
    .busy(tc_busy), .state(tc_st), .mem_req(tc_mem), .mem_rdata(data_in),
    .reg_req(tc_reg), .reg_rdata
  );

  // ---------------- inverse half ----------------
  logic               i_busreq_n, i_ready, i_done;
  logic [1:0]         i_level;
  logic               ir_start, ic_start, ir_done, ic_done, ir_busy, ic_busy;
  logic [STATE_W-1:0] i_top_st, ir_st, ic_st;
  mem_req_t           ir_mem, ic_mem, i_mem;
  reg_req_t           ir_reg, ic_reg, i_reg;

  inverse_ctrl #(.LEVELS(LEVELS)) u_ictrl (
    .clk, .rst(i_rst), .busgrant_n, .busreq_n(i_busreq_n), .ready(i_ready),
    .done(i_done), .level(i_level), .col_start(ic_start), .row_start(ir_start),
    .col_done(ic_done), .row_done(ir_done), .state(i_top_st),
    .col_mem(ic_mem), .row_mem(ir_mem), .col_reg(ic_reg), .row_reg(ir_reg),
    .mem_req(i_mem), .reg_req(i_reg)
  );

  col_inverse #(.IMG(IMG), .OFFSET(OFFSET)) u_icol (
    .clk, .rst(i_rst), .start(ic_start), .level(i_level), .done(ic_done),
    .busy(ic_busy), .state(ic_st), .mem_req(ic_mem), .mem_rdata(data_in),
    .reg_req(ic_reg), .reg_rdata
  );

  row_inverse #(.IMG(IMG), .OFFSET(OFFSET)) u_irow (
    .clk, .rst(i_rst), .start(ir_start), .level(i_level), .done(ir_done),
    .busy(ir_busy), .state(ir_st), .mem_req(ir_mem), .mem_rdata(data_in),
    .reg_req(ir_reg), .reg_rdata
  );

  // ---------------- half select, register file, pins ----------------
  mem_req_t mem;
  reg_req_t rq;
  assign mem = trans_inv ? t_mem : i_mem;
  assign rq  = trans_inv ? t_reg : i_reg;

  regfile u_regfile (
    .clk, .en(rq.en), .we(rq.we), .addr(rq.addr), .wdata(rq.wdata), .rdata(reg_rdata)
  );

  assign addr      = mem.addr;
  assign data_out  = mem.wdata;
  assign memstrobe = mem.strobe;
  assign memwrsel  = mem.rd;
  assign data_oe   = mem.strobe & ~mem.rd;
  assign busreq_n  = trans_inv ? t_busreq_n : i_busreq_n;
  assign ready     = trans_inv ? t_ready    : i_ready;
  assign done      = trans_inv ? t_done     : i_done;

  state_select u_state_sel (
    .trans_inv, .choice(state_choice),
    .t_top(t_top_st), .t_row(tr_st), .t_col(tc_st),
    .i_top(i_top_st), .i_row(ir_st), .i_col(ic_st),
    .state_out
  );

  // engines of one half never run together; each runs only when started
  property p_one_engine;
    @(posedge clk) disable iff (reset) !(tr_busy && tc_busy) && !(ir_busy && ic_busy);
  endproperty
  a_one_engine: assert property (p_one_engine);
endmodule
