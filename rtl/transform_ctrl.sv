// transform_ctrl: top-level state machine of the transform half.
//
// After reset it requests the bus (busreq_n low, ready high) and waits for
// busgrant_n to go low. It then runs LEVELS passes: at level L the row
// engine and then the column engine transform the (IMG >> L)-square corner
// of the image, so the first pass covers the whole image and each later one
// the low-low band of the pass before. When the last column pass ends it
// raises done and releases the bus, and stays there until reset. As on the
// chip, a grant once seen is not checked again.
//
// The controller also owns the bus multiplexers: while a row pass runs the
// row engine drives the RAM and register-file request buses, otherwise the
// column engine does (an idle engine drives an idle request). This replaces
// the chip's tristate buses with multiplexers.
//
// Timing: start pulses last one cycle (ROW_GO / COL_GO); each pass adds two
// controller cycles (GO and the cycle the engine's done is seen) plus one
// NEXT cycle per level. Synchronous active-high reset.
module transform_ctrl
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
  output logic               row_start,
  output logic               col_start,
  input  logic               row_done,
  input  logic               col_done,
  output logic [STATE_W-1:0] state,
  input  mem_req_t           row_mem,
  input  mem_req_t           col_mem,
  input  reg_req_t           row_reg,
  input  reg_req_t           col_reg,
  output mem_req_t           mem_req,
  output reg_req_t           reg_req
);
  typedef enum logic [STATE_W-1:0] {
    REQ, INIT, ROW_GO, ROW_WAIT, COL_GO, COL_WAIT, NEXTLVL, FIN
  } st_t;

  st_t st;

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= REQ;
      level <= '0;
    end else begin
      unique case (st)
        REQ:      if (!busgrant_n) st <= INIT;
        INIT:     begin level <= '0; st <= ROW_GO; end
        ROW_GO:   st <= ROW_WAIT;
        ROW_WAIT: if (row_done) st <= COL_GO;
        COL_GO:   st <= COL_WAIT;
        COL_WAIT: if (col_done) st <= NEXTLVL;
        NEXTLVL: begin
          if (level == 2'(LEVELS - 1)) st <= FIN;
          else begin
            level <= level + 2'd1;
            st    <= ROW_GO;
          end
        end
        FIN:      st <= FIN;
        default:  st <= REQ;
      endcase
    end
  end

  logic row_sel;
  assign row_sel   = (st == ROW_GO) || (st == ROW_WAIT);
  assign mem_req   = row_sel ? row_mem : col_mem;
  assign reg_req   = row_sel ? row_reg : col_reg;
  assign row_start = (st == ROW_GO);
  assign col_start = (st == COL_GO);
  assign busreq_n  = (st == FIN);
  assign ready     = (st == REQ);
  assign done      = (st == FIN);
  assign state     = st;
endmodule
