// quad_decimator_tb: drives random bitstreams with gaps in `sample` and
// compares I (never reset) and Q (reset each window) with a reference count,
// including the one-cycle latency of `valid`, and checks `clr`.
module quad_decimator_tb;
  localparam int WIN = 37;
  logic clk = 0, rst_n = 0, clr = 0, sample = 0, bit_up = 0, window_end = 0;
  logic signed [15:0] i_out, q_out;
  logic valid;
  int checks = 0, failures = 0;
  int ref_i = 0, ref_q = 0, n_in_win = 0, exp_i, exp_q;
  bit exp_valid = 0;

  quad_decimator #(.W(16)) dut (.clk, .rst_n, .clr, .sample, .bit_up, .window_end,
                                .i_out, .q_out, .valid);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // check the output of the previous cycle
      checks++;
      if (valid != exp_valid) failures++;
      if (exp_valid) begin
        checks++;
        if (i_out != 16'(exp_i) || q_out != 16'(exp_q)) begin
          failures++;
          if (failures < 5) $display("I %0d/%0d Q %0d/%0d", i_out, exp_i, q_out, exp_q);
        end
      end
      exp_valid = 0;
      clr    = (cyc == 9000);
      sample = ($urandom_range(0, 3) != 0);
      bit_up = (cyc < 6000) ? ($urandom_range(0, 9) < 7) : ($urandom_range(0, 9) < 3);
      window_end = sample && (n_in_win == WIN - 1);
      if (clr) begin
        ref_i = 0; ref_q = 0; n_in_win = 0;
      end else if (sample) begin
        ref_i += bit_up ? 1 : -1;
        ref_q += bit_up ? 1 : -1;
        if (window_end) begin
          exp_valid = 1; exp_i = ref_i; exp_q = ref_q;
          ref_q = 0; n_in_win = 0;
        end else n_in_win++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
