// quad_decimator: the two up/down counters that decimate one channel's
// bitstream into quadrature outputs.
//
// The bitstream of the delta-squared-sigma modulator is the derivative of the
// input.  A counter that is never reset integrates it back into the signal
// (in-phase output I); a counter that is reset every window only decimates
// it and keeps the derivative, which leads the signal by 90 degrees
// (quadrature output Q).  One counter pair thus replaces Hilbert and all-pass
// filters.  In the multiplying (FIR) mode the reset counter gives the result
// of one incremental conversion.
//
// Interface: `sample` counts `bit_up` (+1 or -1).  When `window_end` comes with
// a sample, the counts including that sample appear on i_out/q_out with
// `valid` one cycle later and the Q counter restarts.  `clr` zeroes both.
// Counters wrap; the width is this design's choice.
module quad_decimator #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                sample,
  input  logic                bit_up,
  input  logic                window_end,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out,
  output logic                valid
);
  logic signed [W-1:0] icnt, qcnt, step, inext, qnext;

  always_comb begin
    step  = bit_up ? W'(1) : -W'(1);
    inext = icnt + step;
    qnext = qcnt + step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt <= '0; qcnt <= '0; i_out <= '0; q_out <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (clr) begin
        icnt <= '0;
        qcnt <= '0;
      end else if (sample) begin
        icnt <= inext;
        if (window_end) begin
          qcnt  <= '0;
          i_out <= inext;
          q_out <= qnext;
          valid <= 1'b1;
        end else begin
          qcnt <= qnext;
        end
      end
    end
  end
endmodule
