// soc_tb_body.svh: end-to-end test sequence shared by the reduced-size and
// the full-size testbenches of neurostim_soc.  The including module declares
// OSR_T and CONV_T (the DUT's oversampling ratio and conversion length),
// WD_CYC (watchdog in cycles), TX_HALF (half period of the transmit clock;
// clk's is 5) and EXPECT_SKIP (whether the radio is too slow to send every
// monitoring window, so that skipped sets are expected), and
// instantiates the DUT as `dut` on the signals declared here.
//
// Sequence: configure everything through the serial command link (including
// one corrupted frame); record in monitoring mode with rail-to-rail offsets
// and send frames over the short-range radio, then the long-range radio;
// fire a manual stimulation episode; switch to FIR mode with closed-loop
// stimulation, where two phase-locked electrodes in different banks must
// produce phase outputs, coherence windows, a detection and an automatic
// stimulation episode with shorting.  Each mechanism is counted and one that
// never happens is a failure.

  logic clk = 0, tx_clk = 0, rst_n = 0;
  sample_t elec [N_CH], vref;
  logic cmd_bit = 0, cmd_bit_valid = 0;
  logic signed [17:0] stim_i [N_CH];
  logic [N_CH-1:0] stim_short;
  logic tx_short_bit, tx_long_bit, tx_bit_strobe;
  logic [7:0] bias_code [N_BIAS];
  sample_t i_out [N_CH], q_out [N_CH];
  logic iq_valid, fir_valid, phase_valid, plv_valid, detect, mode_fir, stim_active;
  acc_t fir_y [N_CH];
  logic [7:0] phase_a, phase_b, cmd_errors;
  logic [23:0] plv;
  logic [15:0] stim_episodes, tx_frames, tx_skipped;

  int checks = 0, failures = 0;
  longint cyc = 0;
  localparam int CH_A = 10, CH_B = 45, CH_HI = 5, CH_LO = 9, CH_S1 = 3, CH_S2 = 40;
  localparam real PI2 = 6.283185307;
  real sig_period;

  // mechanism counters
  int n_cmd = 0, n_iq = 0, n_short_bits = 0, n_long_bits = 0, n_modesw = 0, n_fir = 0;
  int n_phase = 0, n_plv = 0, n_detect = 0, n_stim_cyc = 0, n_short_cyc = 0, n_bad_stim = 0;
  logic mode_q = 0;

  always #5 clk = ~clk;
  always #TX_HALF tx_clk = ~tx_clk;

  // watchdog: the whole sequence needs well under WD_CYC cycles
  initial begin
    repeat (WD_CYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // electrodes: pair channels carry the same sine; two channels sit near the
  // rails; the rest carry small offsets
  always @(negedge clk) begin
    automatic real s = $sin(PI2 * real'(cyc) / sig_period);
    cyc++;
    for (int c = 0; c < N_CH; c++) begin
      if (c == CH_A || c == CH_B) elec[c] = sample_t'(1000 + $rtoi(80.0 * s));
      else if (c == CH_HI)        elec[c] = sample_t'(21000 + $rtoi(300.0 * s));
      else if (c == CH_LO)        elec[c] = sample_t'(-24000 + $rtoi(300.0 * s));
      else                        elec[c] = sample_t'(1000 + c - 32);
    end
  end

  always @(negedge tx_clk) begin
    if (tx_bit_strobe && tx_short_bit) n_short_bits++;
    if (tx_bit_strobe && tx_long_bit) n_long_bits++;
  end

  always @(negedge clk) begin
    if (iq_valid) n_iq++;
    if (mode_fir != mode_q) n_modesw++;
    mode_q = mode_fir;
    if (fir_valid) n_fir++;
    if (phase_valid) n_phase++;
    if (plv_valid) n_plv++;
    if (detect) n_detect++;
    if (stim_active) n_stim_cyc++;
    if (stim_short != 0) n_short_cyc++;
    for (int c = 0; c < N_CH; c++)
      if (stim_i[c] != 0 && !(stim_active && (c == CH_S1 || c == CH_S2))) n_bad_stim++;
  end

  task automatic send(input logic [15:0] a, input logic [15:0] d, input bit corrupt = 0);
    logic [40:0] f = {8'hA5, a, d, (^{a, d}) ^ corrupt};
    for (int i = 40; i >= 0; i--) begin
      @(negedge clk); cmd_bit = f[i]; cmd_bit_valid = 1;
      @(negedge clk); cmd_bit_valid = 0;
    end
    if (!corrupt) n_cmd++;
  endtask

  function automatic logic [15:0] chmem(input int ch, input int word);
    return 16'h1000 | 16'(ch << 5) | 16'(word);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic mech(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: mechanism never happened: %s", what); end
    else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    automatic int ep0;
    automatic int wave [4] = '{9'h132, 9'h132, 9'h032, 9'h032};  // +50, +50, -50, -50
    sig_period = 8.0 * 32.0 * CONV_T;   // eight FIR frames
    vref = 16'sd1000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- configuration over the command link
    for (int k = 0; k < N_BIAS; k++) send(A_BIAS0 + 16'(k), 16'(17 * k + 3));
    send(A_THR, 16'd200, 1);                       // corrupted: dropped
    send(A_PAIR, 16'((CH_B << 8) | CH_A));
    send(A_THR, 16'd200);
    send(A_WIN, 16'd4);
    send(A_ILSB, 16'd3);
    send(A_SPER, 16'd4);
    send(A_WLEN, 16'd3);
    send(A_PPER_L, 16'd40);
    send(A_NPUL, 16'd3);
    send(A_SHORT, 16'd10);
    send(A_MASK0, 16'(1 << CH_S1));
    send(A_MASK0 + 16'd2, 16'(1 << (CH_S2 - 32)));
    for (int i = 0; i < 4; i++) send(A_NEG0 + 16'(i), 16'hF0F0);   // sign blocks of four taps
    for (int c = 0; c < N_CH; c++) send(chmem(c, 1), 16'd2);       // FIR coefficient codes
    send(chmem(CH_HI, 0), 16'd100);
    send(chmem(CH_LO, 0), 16'd100);
    for (int i = 0; i < 4; i++) begin
      send(chmem(CH_S1, 2 + i), 16'(wave[i]));
      send(chmem(CH_S2, 2 + i), 16'(wave[i]));
    end
    chk(cmd_errors == 1, "one corrupted command counted");
    for (int k = 0; k < N_BIAS; k++) chk(bias_code[k] == 8'(17 * k + 3), "bias DAC code");
    // ---- monitoring, short-range radio.  A gain change alters the unit of
    // the never-reset I counter, so the channels are restarted first by a
    // round trip through FIR mode.
    send(A_MODE, 16'b0001);
    send(A_MODE, 16'b1000);
    repeat (40 * OSR_T) @(negedge clk);
    chk(int'(i_out[CH_HI]) * 100 - (int'(elec[CH_HI]) - 1000) < 600 &&
        int'(i_out[CH_HI]) * 100 - (int'(elec[CH_HI]) - 1000) > -600, "I of the +20000 offset channel");
    chk(int'(i_out[CH_LO]) * 100 - (int'(elec[CH_LO]) - 1000) < 600 &&
        int'(i_out[CH_LO]) * 100 - (int'(elec[CH_LO]) - 1000) > -600, "I of the -25000 offset channel");
    chk(int'(i_out[20]) == 20 - 32 || int'(i_out[20]) == 20 - 32 + 1 || int'(i_out[20]) == 20 - 32 - 1,
        "I of a small-offset channel");
    // ---- long-range radio
    send(A_MODE, 16'b1100);
    repeat (4 * (24 + 16 * N_CH)) @(negedge clk);
    // ---- manual stimulation
    ep0 = int'(stim_episodes);
    send(A_TRIG, 16'd1);
    repeat (200) @(negedge clk);
    chk(int'(stim_episodes) == ep0 + 1, "manual stimulation episode");
    // ---- FIR mode with closed loop
    send(A_MODE, 16'b1011);
    repeat (20 * 32 * CONV_T) @(negedge clk);
    chk(n_detect > 0 && int'(stim_episodes) >= ep0 + 2, "closed-loop stimulation after detection");
    chk(fir_y[CH_A] != 0, "filter output of the pair channel");
    // ---- report
    $display("mechanisms:");
    mech(n_cmd, "command frames written");
    mech(int'(cmd_errors), "corrupted command frames dropped");
    mech(n_iq, "monitoring I/Q windows");
    mech(n_short_bits, "short-range radio one-bits");
    mech(n_long_bits, "long-range radio one-bits");
    mech(int'(tx_frames), "radio frames sent");
    if (EXPECT_SKIP) mech(int'(tx_skipped), "data sets skipped by busy radio");
    else chk(tx_skipped == 0, "radio keeps up with every data set");
    mech(n_modesw, "mode switches");
    mech(n_fir, "FIR frames");
    mech(n_phase, "phase pairs computed");
    mech(n_plv, "coherence windows");
    mech(n_detect, "detections");
    mech(int'(stim_episodes), "stimulation episodes");
    mech(n_stim_cyc, "stimulation cycles");
    mech(n_short_cyc, "electrode shorting cycles");
    chk(n_bad_stim == 0, "only masked channels stimulate, only while active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
