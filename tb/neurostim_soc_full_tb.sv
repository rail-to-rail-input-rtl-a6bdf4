// neurostim_soc_full_tb: the same end-to-end sequence as neurostim_soc_tb
// with the chip at its default sizes: 64 channels, OSR 1000, 1000-sample
// conversions in FIR mode (a FIR frame of 32 000 cycles), 64-tap filters.
// The transmit clock runs five times faster than clk, as the radios do, and
// the test checks that every data set is sent.
// The sequence is in soc_tb_body.svh.
module neurostim_soc_full_tb;
  import ns_pkg::*;
  localparam int OSR_T = OSR, CONV_T = OSR;
  localparam int WD_CYC = 1500000;
  localparam int TX_HALF = 1;
  localparam bit EXPECT_SKIP = 0;

`include "soc_tb_body.svh"

  neurostim_soc dut (.*);
endmodule
