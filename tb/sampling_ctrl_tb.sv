// sampling_ctrl_tb: checks the pacing of both modes against a cycle count:
// a window end every OSR samples in monitoring mode; in FIR mode a clearing
// cycle then CONV-1 samples per slot, the slot advancing after each
// conversion and frame_end once per BANK slots; and a restart on each mode
// change.
module sampling_ctrl_tb;
  localparam int OSR = 20, BANK = 4, CONV = 10;
  logic clk = 0, rst_n = 0, req = 0;
  logic mode_fir, sample, clear, win_end, frame_end;
  logic [1:0] slot;
  int checks = 0, failures = 0;
  int t, n_win, n_frame, n_clear;

  sampling_ctrl #(.OSR(OSR), .BANK(BANK), .CONV(CONV)) dut (.clk, .rst_n,
    .mode_fir_req(req), .mode_fir, .sample, .clear, .win_end, .slot, .frame_end);

  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_(input bit s, input bit c, input bit w, input int sl, input bit f);
    checks++;
    if (sample !== s || clear !== c || win_end !== w || int'(slot) != sl || frame_end !== f) begin
      failures++;
      if (failures < 6) $display("t=%0d got s%0d c%0d w%0d slot%0d f%0d, exp s%0d c%0d w%0d slot%0d f%0d",
        t, sample, clear, win_end, slot, frame_end, s, c, w, sl, f);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // monitoring
    for (t = 0; t < 5 * OSR; t++) begin
      #1 expect_(1, 0, (t % OSR) == OSR - 1, 0, 0);
      @(negedge clk);
    end
    // switch to FIR: one clearing cycle, then slots of CONV cycles
    req = 1; #1;
    checks++; if (!clear || sample) failures++;
    @(negedge clk);
    n_win = 0; n_frame = 0;
    for (t = 0; t < 3 * BANK * CONV; t++) begin
      automatic int c = t % CONV;
      automatic int sl = (t / CONV) % BANK;
      #1 expect_(c != 0, c == 0, c == CONV - 1, sl, (c == CONV - 1) && sl == BANK - 1);
      if (frame_end) n_frame++;
      @(negedge clk);
    end
    checks++; if (n_frame != 3) failures++;
    checks++; if (!mode_fir) failures++;
    // back to monitoring mid-slot
    repeat (3) @(negedge clk);
    req = 0; #1;
    checks++; if (!clear) failures++;
    @(negedge clk);
    for (t = 0; t < 2 * OSR; t++) begin
      #1 expect_(1, 0, (t % OSR) == OSR - 1, 0, 0);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
