// d2s_modulator: behavioural model of one differential delta-squared-sigma
// (delta + delta-sigma) recording modulator.  This is a model of an analog
// switched-capacitor circuit, not synthesizable hardware of the chip.
//
// The channel samples the difference between its electrode and the shared
// reference electrode.  Sigma2, the feedback integrator, is the charge a
// current DAC pumps onto a capacitor; it reconstructs the previous input
// sample, so the Delta stage in front of the loop sees only the change of the
// input and never saturates on a dc offset anywhere between the rails.  Sigma1
// integrates the error, the comparator takes its sign, and that bit steers the
// DAC up or down.  Over a window the up/down count of the bitstream is the
// input change divided by the DAC step, so the DAC code sets the channel gain
// (gain inversely proportional to the code, which is what makes the channel a
// multiplier).
//
// Model: every cycle with `sample` high,
//   e      = (vin - vref) - sigma2
//   sigma1 = clamp(sigma1 + e, +/-256)    (amplifier output swing)
//   bit_up = (sigma1 + 8*e >= 0)
//   sigma2 = sigma2 + fb_i           (fb_i is the DAC current of the last bit)
// The comparator sees Sigma1 plus a direct copy of the error, which keeps the
// two-integrator loop stable; this direct path and the swing limit are this
// model's choices.
// Correlated double sampling, amplifier and comparator noise are not modelled.
// `clear` empties both integrators (used before an incremental conversion).
// Timing: bit_up is registered and valid the cycle after a sample.
module d2s_modulator #(
  parameter int W     = 16,  // electrode sample width
  parameter int FW    = 18,  // DAC current width
  parameter int ACC_W = 26   // integrator width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample,  // phi1: take one sample
  input  logic                clear,   // empty both integrators
  input  logic signed [W-1:0] vin,     // electrode voltage code
  input  logic signed [W-1:0] vref,    // reference electrode voltage code
  input  logic signed [FW-1:0] fb_i,   // signed DAC current into Sigma2
  output logic                bit_up   // comparator decision, 1 = step up
);
  localparam int PGAIN = 3;                                  // direct path 8x
  localparam logic signed [ACC_W-1:0] S1_MAX = ACC_W'(1 << 8);  // Sigma1 swing
  logic signed [ACC_W-1:0] sigma1, sigma2;
  logic signed [ACC_W-1:0] err, s1_next, cmp_in;

  always_comb begin
    err     = ACC_W'(vin) - ACC_W'(vref) - sigma2;
    s1_next = sigma1 + err;
    // the integrator output swings no further than its amplifier allows
    if (s1_next > S1_MAX)       s1_next = S1_MAX;
    else if (s1_next < -S1_MAX) s1_next = -S1_MAX;
    cmp_in  = s1_next + (err <<< PGAIN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sigma1 <= '0;
      sigma2 <= '0;
      bit_up <= 1'b1;
    end else if (clear) begin
      sigma1 <= '0;
      sigma2 <= '0;
      bit_up <= 1'b1;
    end else if (sample) begin
      sigma1 <= s1_next;
      sigma2 <= sigma2 + ACC_W'(fb_i);
      bit_up <= (cmp_in >= 0);
    end
  end
endmodule
