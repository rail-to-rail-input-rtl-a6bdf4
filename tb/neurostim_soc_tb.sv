// neurostim_soc_tb: end-to-end test of the whole chip at a reduced
// oversampling ratio and conversion length (64 instead of 1000) so that it
// runs in seconds; the sequence is in soc_tb_body.svh.  Windows of 64
// cycles are shorter than a radio frame, so skipped data sets are expected.
module neurostim_soc_tb;
  import ns_pkg::*;
  localparam int OSR_T = 64, CONV_T = 64;
  localparam int WD_CYC = 200000;
  localparam int TX_HALF = 4;
  localparam bit EXPECT_SKIP = 1;

`include "soc_tb_body.svh"

  neurostim_soc #(.OSR_P(OSR_T), .CONV_P(CONV_T), .TX_DIV(1)) dut (.*);
endmodule
