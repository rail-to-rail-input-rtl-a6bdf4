// current_dac: behavioural model of the 8-bit push/pull current DAC that each
// channel uses both as its stimulator and as the feedback DAC of its
// recording modulator.  Model of an analog circuit, not synthesizable logic
// of the chip.
//
// As on the chip, the DAC is two 4-bit binary-weighted segments: the coarse
// segment (code[7:4]) is biased from a reference 16 times larger than the fine
// segment (code[3:0]), which together give 8 bits.  The smallest current
// (ilsb) is programmable, and `dir` chooses sourcing (push) or sinking
// (pull).  Currents are ideal integers in units of the programmable LSB
// reference; segment mismatch is not modelled.  Purely combinational.
module current_dac #(
  parameter int ILSB_W = 8,   // width of the programmable LSB current
  parameter int OW     = 18   // output width, signed
) (
  input  logic              en,     // DAC connected
  input  logic              dir,    // 1 = push (source), 0 = pull (sink)
  input  logic [7:0]        code,   // magnitude code
  input  logic [ILSB_W-1:0] ilsb,   // programmable LSB current
  output logic signed [OW-1:0] i_out // signed output current
);
  logic [OW-1:0] fine, coarse, mag;

  always_comb begin
    // each segment: four binary-weighted current sources
    fine   = '0;
    coarse = '0;
    for (int b = 0; b < 4; b++) begin
      if (code[b])     fine   = fine   + (OW'(ilsb) << b);
      if (code[b + 4]) coarse = coarse + (OW'(ilsb) << (b + 4)); // 16x reference
    end
    mag   = fine + coarse;
    i_out = !en ? '0 : (dir ? $signed(mag) : -$signed(mag));
  end
endmodule
