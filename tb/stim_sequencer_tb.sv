// stim_sequencer_tb: runs episodes with two timing sets and checks, cycle by
// cycle against a reference schedule, when the DACs are lent to stimulation,
// which waveform sample is played, how many pulses go out, how long the
// electrodes are shorted, the episode count, and that a trigger during an
// episode is ignored.
module stim_sequencer_tb;
  import ns_pkg::*;
  logic clk = 0, rst_n = 0, trigger = 0;
  stim_cfg_t cfg;
  logic active, shorting, busy;
  logic [3:0] wave_idx;
  logic [15:0] episodes;
  int checks = 0, failures = 0;

  stim_sequencer #(.DEPTH(16)) dut (.clk, .rst_n, .trigger, .cfg, .active, .wave_idx,
                                    .shorting, .busy, .episodes);
  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic episode(input int sp, input int wl, input int pp, input int np, input int sl);
    int t, total, act_cycles, short_cycles;
    cfg.samp_period = 16'(sp); cfg.wave_len = 4'(wl); cfg.pulse_period = 24'(pp);
    cfg.n_pulses = 16'(np); cfg.short_len = 16'(sl);
    @(negedge clk); trigger = 1;
    @(negedge clk); trigger = 0;
    total = np * pp + sl;
    act_cycles = 0; short_cycles = 0;
    for (t = 0; t < total; t++) begin
      automatic int tp = t % pp;
      automatic bit exp_act = (t < np * pp) && tp < sp * (wl + 1);
      automatic bit exp_sh  = (t >= np * pp);
      checks++;
      if (active != exp_act || shorting != exp_sh || !busy ||
          (exp_act && int'(wave_idx) != tp / sp)) begin
        failures++;
        if (failures < 6) $display("t=%0d act %0d/%0d short %0d/%0d idx %0d/%0d",
                                   t, active, exp_act, shorting, exp_sh, wave_idx, tp / sp);
      end
      if (t == 3) trigger = 1;   // ignored: episode running
      @(negedge clk);
      trigger = 0;
    end
    checks++; if (busy) begin failures++; $display("still busy"); end
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    episode(3, 3, 20, 4, 5);
    checks++; if (episodes != 1) failures++;
    episode(1, 7, 10, 2, 1);
    checks++; if (episodes != 2) failures++;
    repeat (5) @(negedge clk);
    checks++; if (busy || active || shorting) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
