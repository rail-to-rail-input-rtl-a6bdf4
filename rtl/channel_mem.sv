// channel_mem: the small memory inside each channel that holds its
// multiplication coefficients and its stimulation waveform.
//
// Word 0 is the DAC code used as gain in monitoring mode, word 1 the DAC code
// of this channel's FIR coefficient magnitude, words 2..WAVE_DEPTH+1 the
// stimulation waveform, one {dir, magnitude} sample per word.  Writes come
// from the command path; reads are combinational.  The word map and depth are
// this design's choices.  Reset loads gain and coefficient code 1 and an
// all-zero waveform.
module channel_mem
  import ns_pkg::*;
#(
  parameter int DEPTH = WAVE_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [4:0]               waddr,
  input  logic [15:0]              wdata,
  input  logic [$clog2(DEPTH)-1:0] wave_idx,
  output logic [7:0]               gain_code,
  output logic [7:0]               fir_code,
  output wave_t                    wave
);
  wave_t wmem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gain_code <= 8'd1;
      fir_code  <= 8'd1;
      for (int i = 0; i < DEPTH; i++) wmem[i] <= '0;
    end else if (we) begin
      if (waddr == 5'd0)      gain_code <= wdata[7:0];
      else if (waddr == 5'd1) fir_code  <= wdata[7:0];
      else if (int'(waddr) - 2 < DEPTH)
        wmem[int'(waddr) - 2] <= wave_t'(wdata[8:0]);
    end
  end

  assign wave = wmem[wave_idx];
endmodule
