// neural_channel: one recording / stimulation channel of the chip.
//
// A channel is a delta-squared-sigma modulator (d2s_modulator), the two
// decimation counters that give quadrature I/Q outputs (quad_decimator), an
// 8-bit current DAC (current_dac) and a small coefficient / waveform memory
// (channel_mem).  The DAC is time-multiplexed between two uses:
//  * recording: the comparator bit steers it and it is the feedback
//    integrator's charge pump; its code (monitor gain code, or FIR coefficient
//    code in FIR mode) divides the channel's output, so the channel is an
//    analog multiplier at no extra area;
//  * stimulation (stim_on): it drives the electrode with the current waveform
//    read from the memory at wave_idx, biased with the stimulation LSB
//    current, and the modulator and counters hold.
// The recording DAC LSB is fixed at one input code; that scaling is this
// design's choice.
//
// Outputs: in monitoring mode i_out/q_out with iq_valid one cycle after a
// window end.  In FIR mode prod (the Q count of the conversion saturated to
// 10 bits, or zero for a stimulating channel) with prod_valid one cycle after
// the conversion's last sample.  stim_i is the electrode current, zero when
// not stimulating.
module neural_channel
  import ns_pkg::*;
#(
  parameter int W  = SW,   // electrode sample width
  parameter int FW = 18    // DAC current width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] vin,
  input  logic signed [W-1:0] vref,
  input  logic                mode_fir,
  input  logic                sample,
  input  logic                clear,
  input  logic                win_end,
  input  logic                stim_on,
  input  logic [7:0]          stim_ilsb,
  input  logic [$clog2(WAVE_DEPTH)-1:0] wave_idx,
  input  logic                mem_we,
  input  logic [4:0]          mem_addr,
  input  logic [15:0]         mem_wdata,
  output logic signed [FW-1:0] stim_i,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out,
  output logic                iq_valid,
  output logic signed [PW-1:0] prod,
  output logic                prod_valid
);
  logic [7:0]  gain_code, fir_code, dac_code, dac_ilsb;
  wave_t       wave;
  logic        bit_up, dac_dir, rec_sample, dec_valid;
  logic signed [FW-1:0] dac_i, fb_i;
  logic        fire_q, stim_q;

  channel_mem u_mem (
    .clk, .rst_n, .we(mem_we), .waddr(mem_addr), .wdata(mem_wdata),
    .wave_idx, .gain_code, .fir_code, .wave
  );

  // DAC multiplexer: stimulation or multiplying-ADC feedback
  always_comb begin
    if (stim_on) begin
      dac_code = wave.mag;
      dac_dir  = wave.dir;
      dac_ilsb = stim_ilsb;
    end else begin
      dac_code = mode_fir ? fir_code : gain_code;
      dac_dir  = bit_up;
      dac_ilsb = 8'd1;
    end
  end

  current_dac #(.ILSB_W(8), .OW(FW)) u_dac (
    .en(1'b1), .dir(dac_dir), .code(dac_code), .ilsb(dac_ilsb), .i_out(dac_i)
  );

  assign fb_i       = stim_on ? '0 : dac_i;
  assign stim_i     = stim_on ? dac_i : '0;
  assign rec_sample = sample && !stim_on;

  d2s_modulator #(.W(W), .FW(FW)) u_mod (
    .clk, .rst_n, .sample(rec_sample), .clear, .vin, .vref, .fb_i, .bit_up
  );

  quad_decimator #(.W(W)) u_dec (
    .clk, .rst_n, .clr(clear), .sample(rec_sample), .bit_up,
    .window_end(win_end), .i_out, .q_out, .valid(dec_valid)
  );

  // FIR-mode product of the finished conversion
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fire_q <= 1'b0;
      stim_q <= 1'b0;
    end else begin
      fire_q <= sample && win_end && mode_fir;
      stim_q <= stim_on;
    end
  end

  localparam logic signed [W-1:0] PMAX = W'((1 << (PW - 1)) - 1);
  localparam logic signed [W-1:0] PMIN = -W'(1 << (PW - 1));

  always_comb begin
    if (stim_q)             prod = '0;
    else if (q_out > PMAX)  prod = PW'(PMAX);
    else if (q_out < PMIN)  prod = PW'(PMIN);
    else                    prod = PW'(q_out);
  end

  assign prod_valid = fire_q;
  assign iq_valid   = dec_valid && !mode_fir;
endmodule
