// stim_sequencer: runs one stimulation episode for all channels selected by
// the stimulation mask.
//
// An episode is a train of n_pulses pulses, one every pulse_period cycles.
// During a pulse the sequencer steps wave_idx through waveform samples
// 0..wave_len, holding each for samp_period cycles; every selected channel
// reads its own waveform memory at that index, so each channel can play its
// own arbitrary (monophasic or biphasic) shape.  `active` hands the channels'
// DACs to stimulation for the length of the pulse.  After the last pulse the
// electrodes are shorted to VDD/2 for short_len cycles (`shorting`) to drain
// the charge left by source/sink mismatch, after which the sequencer is idle
// again and counts the episode.  A trigger during an episode is ignored.
// The counter widths, the pulse-relative timing and the shared timing for all
// channels are this design's choices.
module stim_sequencer
  import ns_pkg::*;
#(
  parameter int DEPTH = WAVE_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     trigger,
  input  stim_cfg_t                cfg,
  output logic                     active,
  output logic [$clog2(DEPTH)-1:0] wave_idx,
  output logic                     shorting,
  output logic                     busy,
  output logic [15:0]              episodes
);
  typedef enum logic [1:0] {S_IDLE, S_PULSE, S_GAP, S_SHORT} state_t;
  state_t state;

  logic [15:0] samp_cnt, pulse_cnt, short_cnt;
  logic [23:0] per_cnt;
  logic        last_pulse, period_end;

  assign last_pulse = (pulse_cnt + 16'd1 >= cfg.n_pulses);
  assign period_end = (per_cnt + 24'd1 >= cfg.pulse_period);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      samp_cnt <= '0; pulse_cnt <= '0; short_cnt <= '0; per_cnt <= '0;
      wave_idx <= '0; episodes <= '0;
    end else begin
      case (state)
        S_IDLE: if (trigger) begin
          state     <= S_PULSE;
          samp_cnt  <= '0;
          per_cnt   <= '0;
          pulse_cnt <= '0;
          wave_idx  <= '0;
        end
        S_PULSE: begin
          per_cnt <= per_cnt + 1'b1;
          if (samp_cnt + 16'd1 >= cfg.samp_period) begin
            samp_cnt <= '0;
            if (wave_idx == $clog2(DEPTH)'(cfg.wave_len)) begin
              wave_idx <= '0;
              // a pulse that fills its whole period goes straight on
              if (period_end) begin
                per_cnt <= '0;
                if (last_pulse) begin
                  state     <= S_SHORT;
                  short_cnt <= '0;
                end else begin
                  pulse_cnt <= pulse_cnt + 1'b1;
                end
              end else begin
                state <= S_GAP;
              end
            end else begin
              wave_idx <= wave_idx + 1'b1;
            end
          end else begin
            samp_cnt <= samp_cnt + 1'b1;
          end
        end
        S_GAP: begin
          if (period_end) begin
            per_cnt <= '0;
            if (last_pulse) begin
              state     <= S_SHORT;
              short_cnt <= '0;
            end else begin
              pulse_cnt <= pulse_cnt + 1'b1;
              state     <= S_PULSE;
            end
          end else begin
            per_cnt <= per_cnt + 1'b1;
          end
        end
        S_SHORT: begin
          if (short_cnt + 16'd1 >= cfg.short_len) begin
            state    <= S_IDLE;
            episodes <= episodes + 1'b1;
          end else begin
            short_cnt <= short_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign active   = (state == S_PULSE);
  assign shorting = (state == S_SHORT);
  assign busy     = (state != S_IDLE);
endmodule
