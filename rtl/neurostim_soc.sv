// neurostim_soc: top level of the 64-channel closed-loop neurostimulator.
//
// Signal flow:
//  * 64 electrodes and one reference electrode feed 64 delta-squared-sigma
//    channels in two banks of 32 (channel_bank).  Each channel records with
//    any dc offset between the rails and gives in-phase / quadrature samples.
//  * In FIR (monitoring + detection) mode each bank becomes 32 band-pass
//    64-tap FIR filters: its channels act as the analog coefficient
//    multipliers and per-electrode add-and-delay lines sum the products.
//    sampling_ctrl paces both banks.
//  * sync_dsp takes the filtered outputs of two selected channels, measures
//    their phase coherence with three CORDIC cores and flags a detection.
//  * A detection (when closed_loop is set) or a manual command starts
//    stim_sequencer, which lends the DACs of the masked channels to
//    stimulation, plays their waveforms as a pulse train, and then shorts the
//    electrodes to VDD/2.
//  * tx_framer sends the I samples (monitoring) or the filter outputs (FIR
//    mode, 18-bit values shifted right by 2) with a status byte to the
//    short- or long-range radio.
//  * cmd_decoder and config_regs take commands from the inductive link's ASK
//    demodulator and hold the whole configuration, including the bias DAC
//    codes.
// The radios, the ASK demodulator, the power receiver and the bias voltage
// DAC are analog; their digital sides are the ports of this module.
// Two clocks: clk takes a modulator sample every cycle and runs everything
// except the radio shift, which runs on the transmitters' faster tx_clk
// (tx_short_bit, tx_long_bit and tx_bit_strobe belong to tx_clk).
module neurostim_soc
  import ns_pkg::*;
#(
  parameter int OSR_P  = OSR,    // monitoring oversampling ratio
  parameter int CONV_P = OSR,    // cycles per FIR-mode conversion
  parameter int TX_DIV = 1       // tx_clk cycles per radio bit
) (
  input  logic        clk,
  input  logic        tx_clk,
  input  logic        rst_n,
  input  sample_t     elec [N_CH],
  input  sample_t     vref,
  input  logic        cmd_bit,
  input  logic        cmd_bit_valid,
  output logic signed [17:0] stim_i [N_CH],
  output logic [N_CH-1:0] stim_short,
  output logic        tx_short_bit,
  output logic        tx_long_bit,
  output logic        tx_bit_strobe,
  output logic [7:0]  bias_code [N_BIAS],
  output sample_t     i_out [N_CH],
  output sample_t     q_out [N_CH],
  output logic        iq_valid,
  output acc_t        fir_y [N_CH],
  output logic        fir_valid,
  output logic [7:0]  phase_a,
  output logic [7:0]  phase_b,
  output logic        phase_valid,
  output logic [23:0] plv,
  output logic        plv_valid,
  output logic        detect,
  output logic        mode_fir,
  output logic        stim_active,
  output logic [15:0] stim_episodes,
  output logic [15:0] tx_frames,
  output logic [15:0] tx_skipped,
  output logic [7:0]  cmd_errors
);
  localparam int NBK = N_CH / BANK;

  // command path
  logic        wr;
  logic [15:0] waddr, wdata;
  cfg_t        cfg;
  logic        man_trig, chmem_we;
  logic [5:0]  chmem_ch;
  logic [4:0]  chmem_addr;
  logic [15:0] chmem_data;

  cmd_decoder u_cmd (
    .clk, .rst_n, .bit_in(cmd_bit), .bit_valid(cmd_bit_valid),
    .wr, .addr(waddr), .data(wdata), .errors(cmd_errors)
  );

  config_regs u_cfg (
    .clk, .rst_n, .wr, .addr(waddr), .data(wdata), .cfg, .man_trig,
    .chmem_we, .chmem_ch, .chmem_addr, .chmem_data
  );

  for (genvar k = 0; k < N_BIAS; k++) begin : g_bias
    assign bias_code[k] = cfg.bias_code[8*k +: 8];
  end

  // sampling control
  logic sample, clear, win_end, frame_end;
  logic [$clog2(BANK)-1:0] slot;

  sampling_ctrl #(.OSR(OSR_P), .BANK(BANK), .CONV(CONV_P)) u_samp (
    .clk, .rst_n, .mode_fir_req(cfg.mode_fir), .mode_fir, .sample, .clear,
    .win_end, .slot, .frame_end
  );

  // stimulation
  logic [$clog2(WAVE_DEPTH)-1:0] wave_idx;
  logic shorting, stim_busy;

  stim_sequencer u_stim (
    .clk, .rst_n, .trigger(man_trig || (detect && cfg.closed_loop)),
    .cfg(cfg.stim), .active(stim_active), .wave_idx, .shorting,
    .busy(stim_busy), .episodes(stim_episodes)
  );

  assign stim_short = shorting ? cfg.stim_mask : '0;

  // channel banks
  logic [NBK-1:0] iqv, yv;

  for (genvar b = 0; b < NBK; b++) begin : g_bank
    sample_t              e_b [BANK];
    logic signed [17:0]   s_b [BANK];
    sample_t              i_b [BANK], q_b [BANK];
    acc_t                 y_b [BANK];
    for (genvar j = 0; j < BANK; j++) begin : g_map
      assign e_b[j]             = elec[b*BANK + j];
      assign stim_i[b*BANK + j] = s_b[j];
      assign i_out[b*BANK + j]  = i_b[j];
      assign q_out[b*BANK + j]  = q_b[j];
      assign fir_y[b*BANK + j]  = y_b[j];
    end
    channel_bank #(.NB(BANK), .NT(TAPS), .FW(18)) u_bank (
      .clk, .rst_n, .elec(e_b), .vref, .mode_fir, .sample, .clear, .win_end,
      .slot, .stim_active, .stim_mask(cfg.stim_mask[b*BANK +: BANK]),
      .stim_ilsb(cfg.stim_ilsb), .wave_idx,
      .mem_we(chmem_we && chmem_ch[5] == 1'(b)), .mem_ch(chmem_ch[4:0]),
      .mem_addr(chmem_addr), .mem_wdata(chmem_data), .fir_neg(cfg.fir_neg),
      .stim_i(s_b), .i_out(i_b), .q_out(q_b), .iq_valid(iqv[b]),
      .y(y_b), .y_valid(yv[b])
    );
  end

  assign iq_valid  = iqv[0];
  assign fir_valid = yv[NBK-1];

  // phase-synchrony detection
  sync_dsp #(.W(24), .ITER(12)) u_dsp (
    .clk, .rst_n, .en(mode_fir), .frame(fir_valid),
    .ya(fir_y[cfg.ch_a]), .yb(fir_y[cfg.ch_b]),
    .thr(cfg.plv_thr[8:0]), .win(cfg.plv_win),
    .phase_a, .phase_b, .phase_valid, .plv, .plv_valid, .detect
  );

  // radio framing
  logic [15:0] tx_data [N_CH];
  logic        detect_seen;
  logic        tx_busy;

  for (genvar c = 0; c < N_CH; c++) begin : g_tx
    assign tx_data[c] = mode_fir ? 16'(fir_y[c] >>> 2) : 16'(i_out[c]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          detect_seen <= 1'b0;
    else if (detect)                     detect_seen <= 1'b1;
    else if (!tx_busy && (iq_valid || fir_valid)) detect_seen <= 1'b0;
  end

  tx_framer #(.NW(N_CH), .DIV_SHORT(TX_DIV), .DIV_LONG(TX_DIV)) u_tx (
    .clk, .tx_clk, .rst_n, .en(cfg.tx_en), .radio_sel(cfg.radio_sel),
    .load(iq_valid || fir_valid), .data(tx_data),
    .status({mode_fir, cfg.closed_loop, stim_busy, shorting, detect_seen, 3'b000}),
    .tx_short_bit, .tx_long_bit, .bit_strobe(tx_bit_strobe), .busy(tx_busy),
    .frames(tx_frames), .skipped(tx_skipped)
  );
endmodule
