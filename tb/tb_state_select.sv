// tb_state_select: drives six different state codes and checks that every
// trans_inv / choice combination shows the right one on the state pins.
//
// The unit is combinational: each vector is applied and the output sampled
// one time step later. Expected values come from plain integer arithmetic
// in the testbench, independent of the gate structure under test. A
// watchdog on a free-running clock ends the run if it ever hangs.
module tb_state_select;
  import wavelet_pkg::*;

  logic       clk = 1'b0;
  logic       trans_inv;
  logic [1:0] choice;
  logic [4:0] t_top, t_row, t_col, i_top, i_row, i_col, state_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  state_select dut (.trans_inv, .choice, .t_top, .t_row, .t_col, .i_top, .i_row, .i_col, .state_out);

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [4:0] e;
      t_top = 5'($urandom); t_row = 5'($urandom); t_col = 5'($urandom);
      i_top = 5'($urandom); i_row = 5'($urandom); i_col = 5'($urandom);
      trans_inv = 1'(i);
      choice    = 2'(i >> 1);
      #1;
      case (choice)
        2'b01:   e = trans_inv ? t_row : i_row;
        2'b10:   e = trans_inv ? t_col : i_col;
        default: e = trans_inv ? t_top : i_top;
      endcase
      checks++;
      if (state_out != e) begin
        failures++;
        $display("trans_inv %b choice %0d: %0d, expected %0d", trans_inv, choice, state_out, e);
      end
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
