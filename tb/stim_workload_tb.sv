// stim_workload_tb: plays the two stimulation programs used with the chip
// through the stimulation sequencer and one channel's current DAC, at full
// length, with one clock cycle standing for 1 us (1 MHz clock) and one DAC
// output unit for 1 uA (LSB current 5 uA):
//  1. the closed-loop seizure-abortion burst: square biphasic pulses of
//     150 uA and 100 us per phase, 5 Hz, for 5 s (25 pulses), then shorting;
//  2. an unbalanced biphasic pulse, 50 uA for 80 us sourcing and 120 us
//     sinking, followed at once by shorting of the electrode to VDD/2.
// The waveform words are held here the way a channel's memory holds them.
// Checked: pulse count, pulse spacing, per-phase durations and amplitudes,
// the charge of each phase, total episode length, and that shorting follows
// the last pulse for the programmed number of cycles.
module stim_workload_tb;
  import ns_pkg::*;
  logic clk = 0, rst_n = 0, trigger = 0;
  stim_cfg_t cfg;
  logic active, shorting, busy;
  logic [$clog2(WAVE_DEPTH)-1:0] wave_idx;
  logic [15:0] episodes;
  wave_t wave [WAVE_DEPTH];
  logic signed [17:0] i_stim;
  int checks = 0, failures = 0;

  stim_sequencer dut (.clk, .rst_n, .trigger, .cfg, .active, .wave_idx, .shorting, .busy, .episodes);
  current_dac u_dac (.en(active), .dir(wave[wave_idx].dir), .code(wave[wave_idx].mag),
                     .ilsb(8'd5), .i_out(i_stim));

  always #5 clk = ~clk;

  initial begin
    repeat (5_300_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // measure one episode, sampling each cycle
  longint t, t_first, t_last_start, t_last_active, t_short0, t_end;
  longint q_src, q_snk, n_pulse, n_bad_amp, n_short, max_gap_err;
  int     run_src, run_snk, bad_runs;

  task automatic run_episode(input int amp, input int src_len, input int snk_len, input int period);
    logic act_q = 0;
    int   cur_src = 0, cur_snk = 0;
    t = 0; t_first = -1; t_last_start = -1; t_last_active = -1; t_short0 = -1; t_end = -1;
    q_src = 0; q_snk = 0; n_pulse = 0; n_bad_amp = 0; n_short = 0; max_gap_err = 0; bad_runs = 0;
    @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
    while (busy) begin
      if (active) begin
        if (!act_q) begin
          if (t_last_start >= 0 && t - t_last_start != longint'(period)) max_gap_err++;
          if (t_first < 0) t_first = t;
          t_last_start = t; n_pulse++; cur_src = 0; cur_snk = 0;
        end
        if (i_stim > 0) begin q_src += longint'(i_stim); cur_src++; end
        else if (i_stim < 0) begin q_snk -= longint'(i_stim); cur_snk++; end
        if (i_stim != amp && i_stim != -amp) n_bad_amp++;
        t_last_active = t;
      end else if (act_q) begin
        if (cur_src != src_len || cur_snk != snk_len) bad_runs++;
      end
      if (shorting) begin
        if (t_short0 < 0) t_short0 = t;
        n_short++;
        chk(!active, "no current while shorting");
      end
      act_q = active;
      @(negedge clk); t++;
    end
    t_end = t;
  endtask

  initial begin
    foreach (wave[i]) wave[i] = '0;
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- 1. 150 uA, 100 us per phase, 5 Hz, 5 s
    wave[0] = '{dir: 1'b1, mag: 8'd30};      // 30 x 5 uA sourced
    wave[1] = '{dir: 1'b0, mag: 8'd30};      // 30 x 5 uA sunk
    cfg.samp_period = 16'd100; cfg.wave_len = 4'd1;
    cfg.pulse_period = 24'd200_000; cfg.n_pulses = 16'd25; cfg.short_len = 16'd4;
    run_episode(150, 100, 100, 200_000);
    chk(n_pulse == 25, "25 pulses in the burst");
    chk(max_gap_err == 0, "pulses 200 000 cycles (0.2 s) apart");
    chk(bad_runs == 0, "each pulse 100 us sourcing then 100 us sinking");
    chk(n_bad_amp == 0, "amplitude 150 uA while active");
    chk(q_src == 25 * 150 * 100 && q_snk == q_src, "charge balanced: 15 nC per phase per pulse");
    chk(t_short0 - t_first == 25 * 200_000, "shorting starts 5 s after the burst start");
    chk(n_short == 4, "4 cycles of shorting");
    chk(episodes == 1, "one episode counted");
    $display("burst: %0d pulses, %0d cycles from first pulse to shorting, source %0d sink %0d uA.us",
             n_pulse, t_short0 - t_first, q_src, q_snk);

    // ---- 2. unbalanced biphasic 50 uA, 80 us / 120 us, then shorting
    foreach (wave[i]) wave[i] = '0;
    wave[0] = '{dir: 1'b1, mag: 8'd10};
    wave[1] = '{dir: 1'b1, mag: 8'd10};
    wave[2] = '{dir: 1'b0, mag: 8'd10};
    wave[3] = '{dir: 1'b0, mag: 8'd10};
    wave[4] = '{dir: 1'b0, mag: 8'd10};
    cfg.samp_period = 16'd40; cfg.wave_len = 4'd4;
    cfg.pulse_period = 24'd200; cfg.n_pulses = 16'd1; cfg.short_len = 16'd4;
    run_episode(50, 80, 120, 200);
    chk(n_pulse == 1 && bad_runs == 0, "one pulse of 80 us sourcing and 120 us sinking");
    chk(n_bad_amp == 0, "amplitude 50 uA");
    chk(q_src == 4000 && q_snk == 6000, "4 nC sourced, 6 nC sunk");
    chk(t_short0 == t_last_active + 1, "shorting right after the pulse");
    chk(n_short == 4, "shorting for 4 us");
    chk(episodes == 2, "second episode counted");
    $display("unbalanced pulse: source %0d sink %0d uA.us, shorting %0d cycles after the pulse",
             q_src, q_snk, t_short0 - t_last_active);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
