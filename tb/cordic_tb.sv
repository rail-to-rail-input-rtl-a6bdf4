// cordic_tb: random vectors in all four quadrants.  Vectoring must give the
// angle atan2(y, x) to within one 8-bit step and the magnitude times the
// CORDIC gain 1.6468 to within 0.2 %; rotation by a random 8-bit angle must
// match K * (x cos a - y sin a, x sin a + y cos a).  done must come ITER+2
// cycles after start.
module cordic_tb;
  localparam int W = 24, ITER = 12;
  localparam real K = 1.646760258;
  localparam real PI2 = 6.283185307;
  logic clk = 0, rst_n = 0, start = 0, mode_rot = 0;
  logic signed [W-1:0] x_in, y_in;
  logic [7:0] ang_in = 0, ang_out;
  logic busy, done;
  logic signed [W+1:0] x_out, y_out;
  int checks = 0, failures = 0, lat;

  cordic #(.W(W), .ITER(ITER)) dut (.clk, .rst_n, .start, .mode_rot, .x_in, .y_in, .ang_in,
                                    .busy, .done, .x_out, .y_out, .ang_out);
  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic run(input bit rot, input int x, input int y, input int a);
    @(negedge clk);
    mode_rot = rot; x_in = W'(x); y_in = W'(y); ang_in = 8'(a); start = 1;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != ITER + 2) begin failures++; $display("latency %0d", lat); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      automatic int x = $urandom_range(0, 400000) - 200000;
      automatic int y = $urandom_range(0, 400000) - 200000;
      automatic real mag = $sqrt(real'(x) * x + real'(y) * y);
      automatic real ang = $atan2(real'(y), real'(x)) / PI2 * 256.0;
      automatic int ea, d;
      if (mag < 1000.0) continue;
      run(0, x, y, 0);
      ea = $rtoi(ang + ((ang >= 0) ? 0.5 : -0.5));
      d = (int'(ang_out) - ea) & 255;
      checks++;
      if (!(d == 0 || d == 1 || d == 255)) begin
        failures++; $display("vec (%0d,%0d): ang %0d exp %0d", x, y, ang_out, ea);
      end
      checks++;
      if (fabs(real'(x_out) - K * mag) > 0.002 * K * mag) begin
        failures++; $display("vec (%0d,%0d): mag %0d exp %f", x, y, x_out, K * mag);
      end
    end
    for (int n = 0; n < 400; n++) begin
      automatic int x = $urandom_range(0, 200000) - 100000;
      automatic int y = $urandom_range(0, 200000) - 100000;
      automatic int a = $urandom_range(0, 255);
      automatic real th = a * PI2 / 256.0;
      automatic real ex = K * (x * $cos(th) - y * $sin(th));
      automatic real ey = K * (x * $sin(th) + y * $cos(th));
      automatic real tol = 0.003 * K * $sqrt(real'(x) * x + real'(y) * y) + 4;
      run(1, x, y, a);
      checks++;
      if (fabs(real'(x_out) - ex) > tol || fabs(real'(y_out) - ey) > tol) begin
        failures++; $display("rot a=%0d: (%0d,%0d) exp (%f,%f)", a, x_out, y_out, ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
