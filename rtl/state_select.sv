// state_select: chooses which state machine appears on the state pins.
//
// A debug aid: the five state pins show the state register of one of the
// six state machines. trans_inv picks the half (1 = transform, 0 = inverse
// transform) and choice picks the machine within it: 00 the half's
// top-level controller, 01 its row engine, 10 its column engine. The chip
// names only these three choices; code 11 shows the top-level controller
// again, which is this design's choice. Combinational.
module state_select
  import wavelet_pkg::*;
(
  input  logic               trans_inv,
  input  logic [1:0]         choice,
  input  logic [STATE_W-1:0] t_top,
  input  logic [STATE_W-1:0] t_row,
  input  logic [STATE_W-1:0] t_col,
  input  logic [STATE_W-1:0] i_top,
  input  logic [STATE_W-1:0] i_row,
  input  logic [STATE_W-1:0] i_col,
  output logic [STATE_W-1:0] state_out
);
  logic [STATE_W-1:0] top, row, col;

  assign top = trans_inv ? t_top : i_top;
  assign row = trans_inv ? t_row : i_row;
  assign col = trans_inv ? t_col : i_col;

  always_comb begin
    unique case (choice)
      2'b01:   state_out = row;
      2'b10:   state_out = col;
      default: state_out = top;
    endcase
  end
endmodule
