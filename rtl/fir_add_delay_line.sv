// fir_add_delay_line: one 64-tap FIR filter built as a transposed-form
// add-and-delay line, with no multipliers of its own.
//
// The coefficients are symmetric in magnitude, |M_i| = |M_(63-i)|, so only 32
// products are needed; they are made by the 32 analog multiplying channels of
// a bank.  Product k enters both tap k and tap 63-k, each with its own sign
// (neg).  On each `en` (one new input sample):
//   s[k] <= s[k+1] + (+/-) p[min(k, 63-k)],   s[63] <= (+/-) p[0]
//   y     = s[0]
// so y[n] = sum_k c_k x[n-k].  `clr` empties the line.  The accumulator width
// (18 bits for 10-bit products) is this design's choice; sums wrap.
module fir_add_delay_line #(
  parameter int TAPS = 64,
  parameter int PW   = 10,
  parameter int AW   = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 en,
  input  logic signed [PW-1:0] prod [TAPS/2],
  input  logic [TAPS-1:0]      neg,
  output logic signed [AW-1:0] y
);
  logic signed [AW-1:0] s [TAPS];
  logic signed [AW-1:0] term [TAPS];

  always_comb begin
    for (int k = 0; k < TAPS; k++) begin
      term[k] = AW'(prod[(k < TAPS / 2) ? k : TAPS - 1 - k]);
      if (neg[k]) term[k] = -term[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) s[k] <= '0;
    end else if (clr) begin
      for (int k = 0; k < TAPS; k++) s[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < TAPS - 1; k++) s[k] <= s[k + 1] + term[k];
      s[TAPS - 1] <= term[TAPS - 1];
    end
  end

  assign y = s[0];
endmodule
