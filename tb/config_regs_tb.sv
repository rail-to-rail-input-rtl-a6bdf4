// config_regs_tb: writes every register of the map with random values and
// checks the configuration fields, the manual trigger pulse, the routing of
// channel-memory writes and that unmapped addresses change nothing.
module config_regs_tb;
  import ns_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [15:0] addr = 0, data = 0;
  cfg_t cfg;
  logic man_trig, chmem_we;
  logic [5:0] chmem_ch;
  logic [4:0] chmem_addr;
  logic [15:0] chmem_data;
  int checks = 0, failures = 0;
  logic [15:0] v [16];
  logic [15:0] m [4], g [4];
  logic [7:0]  bc [8];

  config_regs dut (.clk, .rst_n, .wr, .addr, .data, .cfg, .man_trig, .chmem_we,
                   .chmem_ch, .chmem_addr, .chmem_data);
  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic w(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); wr = 1; addr = a; data = d;
    @(negedge clk); wr = 0;
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(cfg.plv_win == 8 && cfg.plv_thr == 200 && cfg.mode_fir == 0, "reset");
    for (int r = 0; r < 20; r++) begin
      foreach (v[i]) v[i] = 16'($urandom);
      foreach (m[i]) m[i] = 16'($urandom);
      foreach (g[i]) g[i] = 16'($urandom);
      foreach (bc[i]) bc[i] = 8'($urandom);
      w(A_MODE, v[0]); w(A_PAIR, v[1]); w(A_THR, v[2]); w(A_WIN, v[3]);
      w(A_ILSB, v[4]); w(A_SPER, v[5]); w(A_WLEN, v[6]); w(A_PPER_L, v[7]);
      w(A_PPER_H, v[8]); w(A_NPUL, v[9]); w(A_SHORT, v[10]);
      for (int i = 0; i < 4; i++) begin w(A_MASK0 + 16'(i), m[i]); w(A_NEG0 + 16'(i), g[i]); end
      for (int i = 0; i < 8; i++) w(A_BIAS0 + 16'(i), {8'h00, bc[i]});
      w(16'h0F00, 16'hFFFF);   // unmapped
      chk({cfg.tx_en, cfg.radio_sel, cfg.closed_loop, cfg.mode_fir} == v[0][3:0], "mode");
      chk(cfg.ch_a == v[1][5:0] && cfg.ch_b == v[1][13:8], "pair");
      chk(cfg.plv_thr == v[2] && cfg.plv_win == v[3][8:0] && cfg.stim_ilsb == v[4][7:0], "thr/win/ilsb");
      chk(cfg.stim.samp_period == v[5] && cfg.stim.wave_len == v[6][3:0], "stim sample");
      chk(cfg.stim.pulse_period == {v[8][7:0], v[7]} && cfg.stim.n_pulses == v[9] &&
          cfg.stim.short_len == v[10], "stim pulse");
      chk(cfg.stim_mask == {m[3], m[2], m[1], m[0]}, "mask");
      chk(cfg.fir_neg == {g[3], g[2], g[1], g[0]}, "signs");
      chk(cfg.bias_code == {bc[7], bc[6], bc[5], bc[4], bc[3], bc[2], bc[1], bc[0]}, "bias");
    end
    // manual trigger
    @(negedge clk); wr = 1; addr = A_TRIG;
    @(negedge clk); wr = 0;
    chk(man_trig == 1, "trigger");
    @(negedge clk);
    chk(man_trig == 0, "trigger pulse");
    // channel memory routing
    @(negedge clk); wr = 1; addr = 16'h1000 | (16'd45 << 5) | 16'd7; data = 16'h1234; #1;
    chk(chmem_we && chmem_ch == 45 && chmem_addr == 7 && chmem_data == 16'h1234, "chmem");
    @(negedge clk); wr = 1; addr = A_THR; #1;
    chk(!chmem_we, "chmem off");
    wr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
