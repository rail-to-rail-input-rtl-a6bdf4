// config_regs: global configuration of the chip, written by the command
// decoder.
//
// Holds the operating mode, the synchrony channel pair, coherence threshold
// and window, stimulation timing, LSB current and channel mask, the FIR tap
// signs, the radio choice and the eight codes of the bias voltage DAC.
// Writes whose address has 4'h1 in bits [15:12] go to the per-channel
// memories instead: channel = addr[10:5], word = addr[4:0].  A write to A_TRIG
// gives a one-cycle manual stimulation trigger.  The register map (ns_pkg)
// and the reset values are this design's choices.
module config_regs
  import ns_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [15:0] addr,
  input  logic [15:0] data,
  output cfg_t        cfg,
  output logic        man_trig,
  output logic        chmem_we,
  output logic [5:0]  chmem_ch,
  output logic [4:0]  chmem_addr,
  output logic [15:0] chmem_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg                  <= '0;
      cfg.plv_thr          <= 16'd200;
      cfg.plv_win          <= 9'd8;
      cfg.stim_ilsb        <= 8'd1;
      cfg.stim.samp_period <= 16'd1;
      cfg.stim.pulse_period<= 24'd1;
      cfg.stim.n_pulses    <= 16'd1;
      cfg.stim.short_len   <= 16'd1;
      man_trig             <= 1'b0;
    end else begin
      man_trig <= 1'b0;
      if (wr && addr[15:12] == 4'h0) begin
        case (addr)
          A_MODE:   {cfg.tx_en, cfg.radio_sel, cfg.closed_loop, cfg.mode_fir} <= data[3:0];
          A_PAIR:   {cfg.ch_b, cfg.ch_a} <= {data[13:8], data[5:0]};
          A_THR:    cfg.plv_thr <= data;
          A_WIN:    cfg.plv_win <= data[8:0];
          A_ILSB:   cfg.stim_ilsb <= data[7:0];
          A_SPER:   cfg.stim.samp_period <= data;
          A_WLEN:   cfg.stim.wave_len <= data[3:0];
          A_PPER_L: cfg.stim.pulse_period[15:0] <= data;
          A_PPER_H: cfg.stim.pulse_period[23:16] <= data[7:0];
          A_NPUL:   cfg.stim.n_pulses <= data;
          A_SHORT:  cfg.stim.short_len <= data;
          A_TRIG:   man_trig <= 1'b1;
          default: begin
            if (addr[15:2] == A_MASK0[15:2])
              cfg.stim_mask[16*addr[1:0] +: 16] <= data;
            else if (addr[15:2] == A_NEG0[15:2])
              cfg.fir_neg[16*addr[1:0] +: 16] <= data;
            else if (addr[15:3] == A_BIAS0[15:3])
              cfg.bias_code[8*addr[2:0] +: 8] <= data[7:0];
          end
        endcase
      end
    end
  end

  assign chmem_we   = wr && addr[15:12] == A_CHMEM_TOP;
  assign chmem_ch   = addr[10:5];
  assign chmem_addr = addr[4:0];
  assign chmem_data = data;
endmodule
