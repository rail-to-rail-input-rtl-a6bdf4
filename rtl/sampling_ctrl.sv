// sampling_ctrl: the counter that paces the modulators, the decimators and
// the FIR add-and-delay lines of both channel banks.
//
// Monitoring mode: every cycle is a modulator sample and every OSR samples
// closes a decimation window (win_end), when each channel delivers one I/Q
// pair.
// FIR (monitoring + detection) mode: the 32 channels of a bank are all
// switched to one electrode of the bank, selected by `slot`.  A slot is one
// incremental conversion of CONV cycles: the first cycle clears the
// integrators (`clear`, no sample), the others sample, and win_end marks the
// last one, after which every channel holds the product of the electrode
// sample and its own coefficient.  The slot counter then advances, so the 32
// electrodes of a bank are converted in turn and each electrode's
// add-and-delay line is clocked once per frame of BANK slots (frame_end).
// The chip keeps the per-channel input impedance by staggering the short
// sampling pulses of the 32 channels inside each sampling period; that is
// sub-cycle analog timing and is not modelled here.
//
// A change of mode restarts all counters and clears the channels in the same
// cycle.  Outputs are registered or decoded from registered state.
module sampling_ctrl #(
  parameter int OSR  = 1000,  // samples per window in monitoring mode
  parameter int BANK = 32,    // electrodes served by one bank
  parameter int CONV = 1000   // cycles per slot conversion in FIR mode
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    mode_fir_req,  // requested mode
  output logic                    mode_fir,      // mode in effect
  output logic                    sample,
  output logic                    clear,
  output logic                    win_end,
  output logic [$clog2(BANK)-1:0] slot,
  output logic                    frame_end
);
  localparam int CW = $clog2(OSR > CONV ? OSR : CONV);
  logic [CW-1:0] cnt;
  logic          switching;

  assign switching = (mode_fir_req != mode_fir);
  assign clear     = switching || (mode_fir && cnt == '0);
  assign sample    = !clear;
  assign win_end   = !switching &&
                     (mode_fir ? (cnt == CW'(CONV - 1)) : (cnt == CW'(OSR - 1)));
  assign frame_end = win_end && mode_fir && (slot == $clog2(BANK)'(BANK - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_fir <= 1'b0;
      cnt      <= '0;
      slot     <= '0;
    end else if (switching) begin
      mode_fir <= mode_fir_req;
      cnt      <= '0;
      slot     <= '0;
    end else if (win_end) begin
      cnt <= '0;
      if (mode_fir) slot <= (slot == $clog2(BANK)'(BANK - 1)) ? '0 : slot + 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
