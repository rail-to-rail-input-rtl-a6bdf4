// channel_bank: a bank of 32 recording / stimulation channels with its
// electrode multiplexer and the 32 add-and-delay lines that turn the bank
// into 32 64-tap FIR filters.
//
// Monitoring mode: channel j records electrode j of the bank and delivers
// I/Q samples.
// FIR mode: a 32-to-1 multiplexer connects all 32 channels to the electrode
// chosen by `slot`.  Channel j's DAC holds the code of coefficient magnitude
// |M_j|, so after one conversion the bank has produced all 32 distinct
// products of that electrode's sample.  They are added into the
// add-and-delay line of that electrode (line `slot`); the lines are clocked
// in turn, one per slot, so each electrode gets one filtered output per frame
// of 32 slots.  y_valid pulses once per frame, after the last line has been
// updated.  The lines are held empty outside FIR mode.
// Stimulation: a channel whose mask bit is set drives its electrode while
// stim_active; its recording holds and its FIR product is zero.
// Channel memory writes select the channel with mem_ch.
module channel_bank
  import ns_pkg::*;
#(
  parameter int NB  = BANK,  // channels and electrodes in the bank
  parameter int NT  = TAPS,  // FIR taps (NB distinct magnitudes)
  parameter int FW  = 18     // stimulation current width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  sample_t                 elec [NB],
  input  sample_t                 vref,
  input  logic                    mode_fir,
  input  logic                    sample,
  input  logic                    clear,
  input  logic                    win_end,
  input  logic [$clog2(NB)-1:0]   slot,
  input  logic                    stim_active,
  input  logic [NB-1:0]           stim_mask,
  input  logic [7:0]              stim_ilsb,
  input  logic [$clog2(WAVE_DEPTH)-1:0] wave_idx,
  input  logic                    mem_we,
  input  logic [$clog2(NB)-1:0]   mem_ch,
  input  logic [4:0]              mem_addr,
  input  logic [15:0]             mem_wdata,
  input  logic [NT-1:0]           fir_neg,
  output logic signed [FW-1:0]    stim_i [NB],
  output sample_t                 i_out [NB],
  output sample_t                 q_out [NB],
  output logic                    iq_valid,
  output acc_t                    y [NB],
  output logic                    y_valid
);
  logic signed [PW-1:0] prod [NB];
  logic [NB-1:0] iqv, pv;
  logic [$clog2(NB)-1:0] slot_q;

  for (genvar j = 0; j < NB; j++) begin : g_ch
    sample_t vin;
    assign vin = mode_fir ? elec[slot] : elec[j];   // electrode multiplexer
    neural_channel #(.W(SW), .FW(FW)) u_ch (
      .clk, .rst_n, .vin, .vref, .mode_fir, .sample, .clear, .win_end,
      .stim_on(stim_active && stim_mask[j]), .stim_ilsb, .wave_idx,
      .mem_we(mem_we && mem_ch == $clog2(NB)'(j)), .mem_addr, .mem_wdata,
      .stim_i(stim_i[j]), .i_out(i_out[j]), .q_out(q_out[j]),
      .iq_valid(iqv[j]), .prod(prod[j]), .prod_valid(pv[j])
    );
  end

  assign iq_valid = iqv[0];

  // remember which electrode the conversion in flight belongs to
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  slot_q <= '0;
    else if (sample && win_end)  slot_q <= slot;
  end

  for (genvar e = 0; e < NB; e++) begin : g_line
    fir_add_delay_line #(.TAPS(NT), .PW(PW), .AW(AW)) u_line (
      .clk, .rst_n, .clr(!mode_fir), .en(pv[0] && slot_q == $clog2(NB)'(e)),
      .prod, .neg(fir_neg), .y(y[e])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= pv[0] && slot_q == $clog2(NB)'(NB - 1);
  end
endmodule
