// channel_bank_tb: a reduced bank (4 channels, 8 taps) paced by
// sampling_ctrl.
//  * Monitoring: each channel records its own electrode; I * gain must match
//    the electrode's offset from the reference.
//  * FIR mode: channel j holds coefficient code c_j; with constant
//    electrodes, each electrode's filter output must settle to
//    sum_k sign_k * (v_e / c_min(k, 7-k)), and y_valid must pulse once per
//    frame of 4 slots.
//  * Stimulation of channel 1 during FIR mode: its products drop out of all
//    filters and only it drives current.
module channel_bank_tb;
  import ns_pkg::*;
  localparam int NB = 4, NT = 8, CONV = 200, OSR = 300;
  logic clk = 0, rst_n = 0, req = 0;
  sample_t elec [NB], vref;
  logic mode_fir, sample, clear, win_end, frame_end, stim_active = 0, iq_valid, y_valid;
  logic [1:0] slot;
  logic [NB-1:0] stim_mask = 4'b0010;
  logic mem_we = 0;
  logic [1:0] mem_ch = 0;
  logic [4:0] mem_addr = 0;
  logic [15:0] mem_wdata = 0;
  logic [NT-1:0] fir_neg;
  logic signed [17:0] stim_i [NB];
  sample_t i_out [NB], q_out [NB];
  acc_t y [NB];
  int checks = 0, failures = 0, nframes;
  int v [NB] = '{230, -170, 95, -310};
  int c [NB] = '{2, 3, 4, 5};

  sampling_ctrl #(.OSR(OSR), .BANK(NB), .CONV(CONV)) u_ctl (.clk, .rst_n, .mode_fir_req(req),
    .mode_fir, .sample, .clear, .win_end, .slot, .frame_end);

  channel_bank #(.NB(NB), .NT(NT), .FW(18)) dut (.clk, .rst_n, .elec, .vref, .mode_fir, .sample,
    .clear, .win_end, .slot, .stim_active, .stim_mask, .stim_ilsb(8'd3), .wave_idx(4'd0),
    .mem_we, .mem_ch, .mem_addr, .mem_wdata, .fir_neg, .stim_i, .i_out, .q_out, .iq_valid,
    .y, .y_valid);

  always #5 clk = ~clk;
  always @(negedge clk) if (y_valid) nframes++;

  initial begin
    #500000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input int ch, input int a, input int d);
    @(negedge clk); mem_we = 1; mem_ch = 2'(ch); mem_addr = 5'(a); mem_wdata = 16'(d);
    @(negedge clk); mem_we = 0;
  endtask

  function automatic int rdiv(input int a, input int b);
    return (a >= 0) ? (a + b / 2) / b : -((-a + b / 2) / b);
  endfunction

  task automatic check_fir(input bit drop1);
    for (int e = 0; e < NB; e++) begin
      automatic int s = 0;
      for (int k = 0; k < NT; k++) begin
        automatic int j = (k < NT / 2) ? k : NT - 1 - k;
        automatic int p = (drop1 && j == 1) ? 0 : rdiv(v[e], c[j]);
        s += fir_neg[k] ? -p : p;
      end
      checks++;
      if (int'(y[e]) - s > 2 * NT || s - int'(y[e]) > 2 * NT) begin
        failures++; $display("electrode %0d: y=%0d exp %0d", e, y[e], s);
      end
    end
  endtask

  initial begin
    fir_neg = 8'b0100_0110;
    vref = 16'sd1000;
    for (int e = 0; e < NB; e++) elec[e] = sample_t'(1000 + v[e]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < NB; j++) begin
      wr(j, 0, 1);        // monitor gain 1
      wr(j, 1, c[j]);     // FIR coefficient code
      wr(j, 2, 9'h1AA);   // waveform sample 0: source 170
    end
    // monitoring
    repeat (3 * OSR) @(negedge clk);
    for (int e = 0; e < NB; e++) begin
      checks++;
      if (int'(i_out[e]) - v[e] > 3 || v[e] - int'(i_out[e]) > 3) begin
        failures++; $display("monitor %0d: I=%0d exp %0d", e, i_out[e], v[e]);
      end
    end
    // FIR mode
    req = 1;
    nframes = 0;
    repeat (12 * NB * CONV) @(negedge clk);
    checks++;
    if (nframes < 11 || nframes > 12) begin failures++; $display("frames %0d", nframes); end
    check_fir(0);
    // stimulate channel 1
    stim_active = 1;
    @(negedge clk);
    for (int j = 0; j < NB; j++) begin
      checks++;
      if (stim_i[j] != ((j == 1) ? 18'sd510 : 18'sd0)) begin failures++; $display("stim_i %0d = %0d", j, stim_i[j]); end
    end
    repeat (11 * NB * CONV) @(negedge clk);
    check_fir(1);
    stim_active = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
