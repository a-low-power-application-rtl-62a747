// tb_wavelet_full: end-to-end test of the chip at its default size, a
// 512 x 512 image with three levels. Same checks as tb_wavelet_asic (see
// wavelet_tb_body.svh); the transform must take exactly the state budget
// of the design, about 2.93 million clock cycles.
module tb_wavelet_full;
  localparam int IMG = 512;

  wavelet_asic dut (
    .clk, .reset, .trans_inv, .state_choice, .busgrant_n, .busreq_n, .ready, .done,
    .addr, .data_in, .data_out, .data_oe, .memstrobe, .memwrsel, .state_out
  );

  `include "wavelet_tb_body.svh"

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
