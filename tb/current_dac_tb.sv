// current_dac_tb: exhaustive check of the 8-bit segmented current DAC model.
// For every code, both directions and several LSB currents, the output must
// equal +/- code * ilsb (the two 4-bit segments with a 16:1 reference ratio
// add up to a plain binary DAC); a disabled DAC must give zero.
module current_dac_tb;
  logic        en, dir;
  logic [7:0]  code, ilsb;
  logic signed [17:0] i_out;
  int checks = 0, failures = 0;

  current_dac #(.ILSB_W(8), .OW(18)) dut (.en, .dir, .code, .ilsb, .i_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ls [4] = '{1, 3, 100, 255};
    foreach (ls[l]) begin
      for (int c = 0; c < 256; c++) begin
        for (int d = 0; d < 2; d++) begin
          en = 1; dir = d[0]; code = 8'(c); ilsb = 8'(ls[l]);
          #1;
          checks++;
          if (i_out != (d ? 1 : -1) * c * ls[l]) begin
            failures++;
            if (failures < 5) $display("code %0d dir %0d ilsb %0d: got %0d", c, d, ls[l], i_out);
          end
        end
      end
    end
    en = 0; code = 8'hff; dir = 1; #1;
    checks++; if (i_out != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
