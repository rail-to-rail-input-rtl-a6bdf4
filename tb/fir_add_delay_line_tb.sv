// fir_add_delay_line_tb: feeds random product sets (32 products per input
// sample, as the bank delivers them) with random tap signs and random gaps
// between enables, and compares the output with the direct-form sum
//   y[n] = sum_k sign_k * P[n-k][min(k, 63-k)]
// computed from a history of the inputs.  Also checks `clr`.
module fir_add_delay_line_tb;
  localparam int TAPS = 64, PW = 10, AW = 18;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic signed [PW-1:0] prod [TAPS/2];
  logic [TAPS-1:0] neg;
  logic signed [AW-1:0] y;
  int hist [200][TAPS/2];
  int n = 0, expv, checks = 0, failures = 0;

  fir_add_delay_line #(.TAPS(TAPS), .PW(PW), .AW(AW)) dut (.clk, .rst_n, .clr, .en, .prod, .neg, .y);
  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int ref_y(input int upto);
    int s = 0;
    for (int k = 0; k < TAPS; k++)
      if (upto - k >= 0) begin
        automatic int p = hist[upto - k][(k < TAPS/2) ? k : TAPS - 1 - k];
        s += neg[k] ? -p : p;
      end
    return s;
  endfunction

  initial begin
    neg = {$urandom, $urandom};
    foreach (prod[j]) prod[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      n = 0;
      while (n < 150) begin
        @(negedge clk);
        en = ($urandom_range(0, 2) == 0);
        if (en) begin
          foreach (prod[j]) begin
            prod[j] = PW'($urandom_range(0, 1023));
            hist[n][j] = int'(prod[j]);
          end
        end
        @(negedge clk);
        if (en) begin
          expv = ref_y(n);
          checks++;
          if (int'(y) != expv) begin
            failures++;
            if (failures < 5) $display("n=%0d y=%0d exp=%0d", n, y, expv);
          end
          n++;
        end
        en = 0;
      end
      // clear empties the line
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      checks++; if (y != 0) failures++;
      neg = {$urandom, $urandom};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
