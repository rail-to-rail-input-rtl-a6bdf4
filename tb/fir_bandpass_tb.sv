// fir_bandpass_tb: one full-size bank (32 channels, 64-tap add-and-delay
// lines, 1000-cycle conversions, frames of 32 slots) programmed as a 10 Hz
// band-pass filter at 80 samples per second, i.e. a 2.56 MHz clock.
//
// The wanted response is a Hann-windowed 10 Hz cosine, symmetric about the
// middle tap.  Channel j gets the DAC code c_j = round(max|h| / |h_j|)
// (clamped to 1..255), so its gain 1/c_j approximates |h_j|, and each tap's
// sign bit is the sign of h_k.  Electrode 0 carries a 10 Hz sine and
// electrode 1 a 30 Hz sine, both of amplitude A.  After the filter has
// filled, the output amplitude of each is measured over a whole number of
// periods and compared with A * |H(f)|, where H is the response of the ideal
// filter with the same rounded weights +-1/c, computed here in floating
// point.  Also checked: one output per electrode every 32 000 cycles.
module fir_bandpass_tb;
  import ns_pkg::*;
  localparam int NB = BANK, NT = TAPS;
  localparam real PI = 3.14159265358979;
  localparam real FS = 80.0, F0 = 10.0, CLK_HZ = 2_560_000.0, A = 400.0;
  localparam int SETTLE = 70, MEAS = 40;   // frames

  logic clk = 0, rst_n = 0, req = 0;
  sample_t elec [NB], vref;
  logic mode_fir, sample, clear, win_end, frame_end, iq_valid, y_valid;
  logic [$clog2(NB)-1:0] slot;
  logic mem_we = 0;
  logic [$clog2(NB)-1:0] mem_ch = 0;
  logic [4:0] mem_addr = 0;
  logic [15:0] mem_wdata = 0;
  logic [NT-1:0] fir_neg;
  logic signed [17:0] stim_i [NB];
  sample_t i_out [NB], q_out [NB];
  acc_t y [NB];
  int checks = 0, failures = 0;

  sampling_ctrl u_ctl (.clk, .rst_n, .mode_fir_req(req), .mode_fir, .sample, .clear, .win_end,
    .slot, .frame_end);

  channel_bank dut (.clk, .rst_n, .elec, .vref, .mode_fir, .sample, .clear, .win_end, .slot,
    .stim_active(1'b0), .stim_mask('0), .stim_ilsb(8'd1), .wave_idx('0), .mem_we, .mem_ch,
    .mem_addr, .mem_wdata, .fir_neg, .stim_i, .i_out, .q_out, .iq_valid, .y, .y_valid);

  always #5 clk = ~clk;

  initial begin
    repeat ((SETTLE + MEAS + 5) * 32 * 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // electrodes: two tones, the rest at the reference
  longint cyc = 0;
  always @(negedge clk) begin
    automatic real t = real'(cyc) / CLK_HZ;
    cyc++;
    for (int e = 0; e < NB; e++) elec[e] = '0;
    elec[0] = sample_t'($rtoi(A * $sin(2.0 * PI * F0 * t)));
    elec[1] = sample_t'($rtoi(A * $sin(2.0 * PI * 3.0 * F0 * t)));
  end

  int   code [NB];
  real  w [NT];

  function automatic real h_of(input int k);
    real win;
    win = 0.5 - 0.5 * $cos(2.0 * PI * (real'(k) + 0.5) / real'(NT));
    return win * $cos(2.0 * PI * F0 / FS * (real'(k) - real'(NT - 1) / 2.0));
  endfunction

  function automatic real gain_at(input real f);
    real re = 0.0, im = 0.0;
    for (int k = 0; k < NT; k++) begin
      re += w[k] * $cos(2.0 * PI * f / FS * real'(k));
      im -= w[k] * $sin(2.0 * PI * f / FS * real'(k));
    end
    return $sqrt(re * re + im * im);
  endfunction

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    real hmax = 0.0, g10, g30, s10 = 0.0, s30 = 0.0, a10, a30;
    int nfr = 0, nmeas = 0, bad_spacing = 0;
    longint last_valid = -1;

    vref = '0;
    for (int k = 0; k < NT; k++) if (fabs(h_of(k)) > hmax) hmax = fabs(h_of(k));
    for (int j = 0; j < NB; j++) begin
      real m;
      int  c;
      m = fabs(h_of(j));
      c = (m * 255.0 < hmax) ? 255 : $rtoi(hmax / m + 0.5);
      code[j] = (c < 1) ? 1 : (c > 255 ? 255 : c);
    end
    for (int k = 0; k < NT; k++) begin
      fir_neg[k] = h_of(k) < 0.0;
      w[k] = (fir_neg[k] ? -1.0 : 1.0) / real'(code[(k < NT / 2) ? k : NT - 1 - k]);
    end
    g10 = gain_at(F0);
    g30 = gain_at(3.0 * F0);

    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < NB; j++) begin
      @(negedge clk); mem_we = 1; mem_ch = $clog2(NB)'(j); mem_addr = 5'd1; mem_wdata = 16'(code[j]);
    end
    @(negedge clk); mem_we = 0; req = 1;

    while (nfr < SETTLE + MEAS) begin
      @(negedge clk);
      if (y_valid) begin
        if (last_valid >= 0 && cyc - last_valid != 32 * 1000) bad_spacing++;
        last_valid = cyc;
        nfr++;
        if (nfr > SETTLE) begin
          s10 += real'(y[0]) * real'(y[0]);
          s30 += real'(y[1]) * real'(y[1]);
          nmeas++;
        end
      end
    end
    a10 = $sqrt(2.0 * s10 / real'(nmeas));
    a30 = $sqrt(2.0 * s30 / real'(nmeas));
    $display("ideal gain at 10 Hz %0.2f, at 30 Hz %0.3f", g10, g30);
    $display("output amplitude at 10 Hz %0.1f (ideal %0.1f), at 30 Hz %0.1f (ideal %0.1f)",
             a10, A * g10, a30, A * g30);
    chk(bad_spacing == 0, "one output per electrode every 32 000 cycles (80 S/s at 2.56 MHz)");
    chk(fabs(a10 - A * g10) < 0.08 * A * g10, "pass-band amplitude within 8% of the ideal filter");
    chk(a30 < A * g30 + 60.0, "stop-band amplitude near the ideal filter's");
    chk(a10 > 10.0 * a30, "at least 20 dB between 10 Hz and 30 Hz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
