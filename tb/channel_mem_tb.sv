// channel_mem_tb: writes random gain and coefficient codes and waveform
// samples through the word map and reads them back; checks reset values.
module channel_mem_tb;
  import ns_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] waddr = 0;
  logic [15:0] wdata = 0;
  logic [3:0] wave_idx = 0;
  logic [7:0] gain_code, fir_code;
  wave_t wave;
  wave_t model [16];
  logic [7:0] mg, mf;
  int checks = 0, failures = 0;

  channel_mem #(.DEPTH(16)) dut (.clk, .rst_n, .we, .waddr, .wdata, .wave_idx,
                                 .gain_code, .fir_code, .wave);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (gain_code != 1 || fir_code != 1) failures++;
    mg = 1; mf = 1;
    foreach (model[i]) model[i] = '0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1; waddr = 5'($urandom_range(0, 17)); wdata = 16'($urandom);
      if (waddr == 0) mg = wdata[7:0];
      else if (waddr == 1) mf = wdata[7:0];
      else model[waddr - 2] = wave_t'(wdata[8:0]);
      @(negedge clk);
      we = 0;
      for (int i = 0; i < 16; i++) begin
        wave_idx = 4'(i); #1;
        checks++;
        if (wave != model[i]) failures++;
      end
      checks++;
      if (gain_code != mg || fir_code != mf) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
