// neural_channel_tb: one channel in its three uses.
//  1. Monitoring: electrode 15000 codes above the reference plus a sine,
//     gain code 10.  I * 10 must follow vin - vref and Q * 10 the change of
//     the input over each window.
//  2. FIR mode (multiplying ADC): coefficient code 3, constant inputs; each
//     incremental conversion must give (vin - vref) / 3, and a large input
//     with code 1 must saturate at the 10-bit limit 511.
//  3. Stimulation: the DAC plays the waveform memory with the stimulation
//     LSB current; recording holds and the FIR product is forced to zero.
module neural_channel_tb;
  import ns_pkg::*;
  localparam int WIN = 200;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] vin = 0, vref = 500;
  logic mode_fir = 0, sample = 0, clear = 0, win_end = 0, stim_on = 0;
  logic [7:0] stim_ilsb = 7;
  logic [3:0] wave_idx = 0;
  logic mem_we = 0;
  logic [4:0] mem_addr = 0;
  logic [15:0] mem_wdata = 0;
  logic signed [17:0] stim_i;
  logic signed [15:0] i_out, q_out;
  logic iq_valid, prod_valid;
  logic signed [9:0] prod;
  int checks = 0, failures = 0;
  int v_end, v_prev, n_iq, expv, e;
  logic signed [15:0] i_hold;

  neural_channel dut (.clk, .rst_n, .vin, .vref, .mode_fir, .sample, .clear, .win_end,
    .stim_on, .stim_ilsb, .wave_idx, .mem_we, .mem_addr, .mem_wdata,
    .stim_i, .i_out, .q_out, .iq_valid, .prod, .prod_valid);

  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input int a, input int d);
    @(negedge clk); mem_we = 1; mem_addr = 5'(a); mem_wdata = 16'(d);
    @(negedge clk); mem_we = 0;
  endtask

  task automatic convert(input int v, input int conv, output int p);
    @(negedge clk); vin = 16'(int'(vref) + v); clear = 1; sample = 0; win_end = 0;
    for (int t = 0; t < conv; t++) begin
      @(negedge clk); clear = 0; sample = 1; win_end = (t == conv - 1);
    end
    @(negedge clk); sample = 0; win_end = 0;
    if (!prod_valid) begin failures++; $display("prod_valid missing"); end
    p = prod;
  endtask

  initial begin
    int p;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. monitoring
    wr(0, 10);
    v_prev = 0; n_iq = 0;
    for (int t = 0; t < 40 * WIN; t++) begin
      @(negedge clk);
      if (iq_valid) begin
        n_iq++;
        if (n_iq > 10) begin
          checks += 2;
          e = int'(i_out) * 10 - v_end;
          if (e > 50 || e < -50) begin failures++; $display("I err %0d", e); end
          e = int'(q_out) * 10 - (v_end - v_prev);
          if (e > 80 || e < -80) begin failures++; $display("Q err %0d", e); end
        end
      end
      vin = 16'(15500 + $rtoi(300.0 * $sin(6.2831853 * t / 4000.0)));
      sample = 1;
      win_end = ((t % WIN) == WIN - 1);
      if (win_end) begin v_prev = v_end; v_end = int'(vin) - int'(vref); end
    end
    checks++; if (n_iq != 39 && n_iq != 40) begin failures++; $display("n_iq %0d", n_iq); end
    @(negedge clk); sample = 0; win_end = 0;
    // 2. FIR mode: multiplying ADC
    mode_fir = 1;
    wr(1, 3);
    for (int k = 0; k < 12; k++) begin
      automatic int v = $urandom_range(0, 1200) - 600;
      convert(v, 300, p);
      expv = (v >= 0) ? (v + 1) / 3 : -((-v + 1) / 3);
      checks++;
      if (p - expv > 2 || expv - p > 2) begin failures++; $display("prod %0d exp %0d (v=%0d)", p, expv, v); end
    end
    wr(1, 1);
    convert(1000, 800, p);
    checks++; if (p != 511) begin failures++; $display("sat %0d", p); end
    convert(-1000, 800, p);
    checks++; if (p != -512) begin failures++; $display("sat- %0d", p); end
    // 3. stimulation
    for (int i = 0; i < 8; i++) wr(2 + i, ((i < 4) ? 9'h100 : 9'h000) | (20 * i + 5));
    mode_fir = 0;
    @(negedge clk); i_hold = i_out;
    stim_on = 1;
    for (int i = 0; i < 8; i++) begin
      wave_idx = 4'(i); sample = 1; win_end = 0;
      @(negedge clk);
      checks++;
      if (stim_i != ((i < 4) ? 1 : -1) * (20 * i + 5) * 7) begin
        failures++; $display("stim %0d: %0d", i, stim_i);
      end
    end
    stim_on = 0; sample = 0; #1;
    checks++; if (stim_i != 0) failures++;
    // the counters held while the DAC stimulated: one more window shows only
    // the samples taken after stimulation
    checks++; if (i_out != i_hold) failures++;
    // a stimulating channel gives a zero FIR product
    mode_fir = 1;
    fork
      convert(400, 300, p);
      begin repeat (290) @(negedge clk); stim_on = 1; repeat (20) @(negedge clk); stim_on = 0; end
    join
    checks++; if (p != 0) begin failures++; $display("stim prod %0d", p); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
