// sync_dsp_tb: feeds the synchrony processor frame by frame.
//  * Two phase-locked sines (same frequency, fixed 60 degree offset): the
//    8-bit phases must match atan2 of (y[n-2] - y[n], y[n-1]) computed here
//    in floating point, the windowed coherence must be close to 256 * win and
//    every full window must raise `detect`.
//  * Channel b replaced by random noise: the coherence must match the value
//    computed here from the reference phases and no window may detect.
module sync_dsp_tb;
  import ns_pkg::*;
  localparam real PI2 = 6.283185307;
  localparam int WIN = 8, THR = 230;
  logic clk = 0, rst_n = 0, frame = 0;
  acc_t ya = 0, yb = 0;
  logic [7:0] phase_a, phase_b;
  logic phase_valid, plv_valid, detect;
  logic [23:0] plv;
  int checks = 0, failures = 0;
  real ha [3], hb [3];
  real sc, ss, ref_plv;
  int n_det, n_plv;

  sync_dsp #(.W(24), .ITER(12)) dut (.clk, .rst_n, .en(1'b1), .frame, .ya, .yb,
    .thr(9'(THR)), .win(9'(WIN)), .phase_a, .phase_b, .phase_valid, .plv, .plv_valid, .detect);

  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int ref_phase(input real h0, input real h1, input real h2);
    // h0 = y[n], h1 = y[n-1], h2 = y[n-2]
    real a = $atan2(h2 - h0, h1) / PI2 * 256.0;
    return $rtoi(a + ((a >= 0) ? 0.5 : -0.5)) & 255;
  endfunction

  function automatic bit near(input int a, input int b);
    int d = (a - b) & 255;
    return d <= 1 || d == 255;
  endfunction

  task automatic run(input int nframes, input bit locked);
    for (int n = 0; n < nframes; n++) begin
      automatic real va = 3000.0 * $cos(PI2 * n / 8.0);
      automatic real vb = locked ? 3000.0 * $cos(PI2 * n / 8.0 + PI2 / 6.0)
                                 : real'($urandom_range(0, 6000)) - 3000.0;
      automatic int pa, pb;
      @(negedge clk);
      ya = acc_t'($rtoi(va)); yb = acc_t'($rtoi(vb));
      ha[2] = ha[1]; ha[1] = ha[0]; ha[0] = real'(ya);
      hb[2] = hb[1]; hb[1] = hb[0]; hb[0] = real'(yb);
      frame = 1;
      @(negedge clk); frame = 0;
      pa = ref_phase(ha[0], ha[1], ha[2]);
      pb = ref_phase(hb[0], hb[1], hb[2]);
      while (!phase_valid) @(negedge clk);
      checks++;
      if (!near(int'(phase_a), pa) || !near(int'(phase_b), pb)) begin
        failures++; $display("frame %0d phase %0d/%0d exp %0d/%0d", n, phase_a, phase_b, pa, pb);
      end
      sc += $cos(PI2 * ((pa - pb) & 255) / 256.0) * 256.0;
      ss += $sin(PI2 * ((pa - pb) & 255) / 256.0) * 256.0;
      if (((n + 1) % WIN) == 0) begin
        ref_plv = $sqrt(sc * sc + ss * ss);
        sc = 0; ss = 0;
        while (!plv_valid) @(negedge clk);
        n_plv++;
        if (n >= WIN) begin   // skip the window holding start-up history
          checks += 2;
          if (real'(plv) < ref_plv - 0.04 * 256 * WIN || real'(plv) > ref_plv + 0.04 * 256 * WIN) begin
            failures++; $display("plv %0d exp %f", plv, ref_plv);
          end
          if (detect != (ref_plv >= THR * WIN)) begin
            failures++; $display("detect %0d with plv %0d", detect, plv);
          end
          if (detect) n_det++;
        end
      end
      repeat (60) @(negedge clk);
    end
  endtask

  initial begin
    foreach (ha[i]) begin ha[i] = 0; hb[i] = 0; end
    sc = 0; ss = 0; n_det = 0; n_plv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(6 * WIN, 1);
    checks++; if (n_det != 5) begin failures++; $display("locked detections %0d", n_det); end
    n_det = 0;
    run(6 * WIN, 0);
    checks++; if (n_det != 0) begin failures++; $display("noise detections %0d", n_det); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
