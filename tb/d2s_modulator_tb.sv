// d2s_modulator_tb: closes the modulator loop with an ideal DAC step and
// checks that the bitstream tracks the input difference vin - vref for dc
// offsets from rail to rail (-30000 .. +30000 codes) plus a sine: the
// running up/down count times the step must stay within a few steps of the
// input after settling.  Also checks that `clear` restarts the loop.
module d2s_modulator_tb;
  logic clk = 0, rst_n = 0, sample = 0, clear = 0;
  logic signed [15:0] vin = 0, vref = 0;
  logic signed [17:0] fb_i;
  logic bit_up;
  int checks = 0, failures = 0;
  int step, count, err, worst;

  d2s_modulator #(.W(16), .FW(18), .ACC_W(26)) dut (.clk, .rst_n, .sample, .clear,
                                                   .vin, .vref, .fb_i, .bit_up);
  assign fb_i = bit_up ? 18'(step) : -18'(step);

  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int offs [5] = '{-30000, -1200, 0, 900, 30000};
    automatic int steps [3] = '{20, 50, 120};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (offs[o]) foreach (steps[s]) begin
      step = steps[s];
      vref = 16'(-500 + 100 * o);
      // clear the loop
      @(negedge clk); clear = 1; sample = 0;
      @(negedge clk); clear = 0; sample = 1; count = 0;
      worst = 0;
      for (int t = 0; t < 6000; t++) begin
        vin = 16'(offs[o] + $rtoi(400.0 * $sin(6.2831853 * t / 1500.0)));
        if (offs[o] + 400 > 32767) vin = 16'(32767 - 400 + $rtoi(400.0 * $sin(6.2831853 * t / 1500.0)));
        count += bit_up ? 1 : -1;     // the DAC step applied at this edge
        @(negedge clk);
        if (t > 2000) begin
          err = count * step - (int'(vin) - int'(vref));
          if (err < 0) err = -err;
          if (err > worst) worst = err;
        end
      end
      checks++;
      if (worst > 4 * step) begin
        failures++;
        $display("offset %0d step %0d: worst tracking error %0d", offs[o], step, worst);
      end
    end
    // clear: bit returns to 1 (up) and the loop restarts from zero
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    checks++; if (bit_up != 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
