// tb_wavelet_asic: end-to-end test of the chip on a 64 x 64 image.
// Runs the transform and then the inverse transform against the reference
// model; see wavelet_tb_body.svh for the checks. A watchdog ends the run if
// the chip stalls.
module tb_wavelet_asic;
  localparam int IMG = 64;

  wavelet_asic #(.IMG(IMG)) dut (
    .clk, .reset, .trans_inv, .state_choice, .busgrant_n, .busreq_n, .ready, .done,
    .addr, .data_in, .data_out, .data_oe, .memstrobe, .memwrsel, .state_out
  );

  `include "wavelet_tb_body.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
