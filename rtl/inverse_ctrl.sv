// inverse_ctrl: top-level state machine of the inverse-transform half.
//
// Mirrors transform_ctrl in reverse order. After reset it requests the bus
// (busreq_n low, ready high) and waits for busgrant_n low, then runs LEVELS
// passes starting at the coarsest level: at level L the column inverse
// engine and then the row inverse engine rebuild the (IMG >> L)-square
// corner, so the passes cover 128, 256 and finally 512 square pixels for
// the default 512-pixel image. After the last row pass it raises done,
// releases the bus and stays there until reset.
//
// While a column pass runs the column engine drives the RAM and register
// request buses, otherwise the row engine does (multiplexers in place of
// the chip's tristate buses). Synchronous active-high reset.
module inverse_ctrl
  import wavelet_pkg::*;
#(
  parameter int unsigned LEVELS = 3
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               busgrant_n,
  output logic               busreq_n,
  output logic               ready,
  output logic               done,
  output logic [1:0]         level,
  output logic               col_start,
  output logic               row_start,
  input  logic               col_done,
  input  logic               row_done,
  output logic [STATE_W-1:0] state,
  input  mem_req_t           col_mem,
  input  mem_req_t           row_mem,
  input  reg_req_t           col_reg,
  input  reg_req_t           row_reg,
  output mem_req_t           mem_req,
  output reg_req_t           reg_req
);
  typedef enum logic [STATE_W-1:0] {
    REQ, INIT, COL_GO, COL_WAIT, ROW_GO, ROW_WAIT, NEXTLVL, FIN
  } st_t;

  st_t st;

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= REQ;
      level <= '0;
    end else begin
      unique case (st)
        REQ:      if (!busgrant_n) st <= INIT;
        INIT:     begin level <= 2'(LEVELS - 1); st <= COL_GO; end
        COL_GO:   st <= COL_WAIT;
        COL_WAIT: if (col_done) st <= ROW_GO;
        ROW_GO:   st <= ROW_WAIT;
        ROW_WAIT: if (row_done) st <= NEXTLVL;
        NEXTLVL: begin
          if (level == 2'd0) st <= FIN;
          else begin
            level <= level - 2'd1;
            st    <= COL_GO;
          end
        end
        FIN:      st <= FIN;
        default:  st <= REQ;
      endcase
    end
  end

  logic col_sel;
  assign col_sel   = (st == COL_GO) || (st == COL_WAIT);
  assign mem_req   = col_sel ? col_mem : row_mem;
  assign reg_req   = col_sel ? col_reg : row_reg;
  assign col_start = (st == COL_GO);
  assign row_start = (st == ROW_GO);
  assign busreq_n  = (st == FIN);
  assign ready     = (st == REQ);
  assign done      = (st == FIN);
  assign state     = st;
endmodule
