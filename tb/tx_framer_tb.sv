// tx_framer_tb: loads random data sets on the system clock while the framer
// shifts them out on an unrelated, faster transmit clock.  A monitor on the
// transmit clock captures the selected radio's line at every bit strobe and
// checks that the other radio stays silent and that bits are exactly
// DIV_SHORT or DIV_LONG transmit cycles apart.  After each frame the sync
// word, status and data words are rebuilt and compared; the frame count,
// the busy flag and the skipping of a set offered while busy are checked.
module tx_framer_tb;
  localparam int NW = 8, DS = 2, DL = 3;
  localparam int NB = 24 + 16 * NW;
  logic clk = 0, tx_clk = 0, rst_n = 0, en = 1, radio_sel = 0, load = 0;
  logic [15:0] data [NW];
  logic [7:0] status;
  logic tx_short_bit, tx_long_bit, bit_strobe, busy;
  logic [15:0] frames, skipped;
  int checks = 0, failures = 0;

  tx_framer #(.NW(NW), .DIV_SHORT(DS), .DIV_LONG(DL)) dut (.clk, .tx_clk, .rst_n, .en, .radio_sel,
    .load, .data, .status, .tx_short_bit, .tx_long_bit, .bit_strobe, .busy, .frames, .skipped);
  always #5 clk = ~clk;
  always #3 tx_clk = ~tx_clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // transmit-side monitor
  bit got [$];
  bit cur_sel = 0;
  longint tcyc = 0, last_strobe = -1;
  always @(negedge tx_clk) begin
    tcyc++;
    if (bit_strobe) begin
      got.push_back(cur_sel ? tx_long_bit : tx_short_bit);
      if (last_strobe >= 0) begin
        checks++;
        if (tcyc - last_strobe != longint'(cur_sel ? DL : DS)) begin
          failures++; $display("bit period %0d", tcyc - last_strobe);
        end
      end
      last_strobe = tcyc;
    end
    if ((cur_sel ? tx_short_bit : tx_long_bit) != 0) begin
      checks++; failures++; $display("unselected radio active");
    end
  end

  task automatic frame(input bit sel, input int n_before);
    logic [NB-1:0] expf;
    logic [15:0] d [NW];
    logic [7:0] st;
    int wait_cyc = 0;
    foreach (d[i]) d[i] = 16'($urandom);
    st = 8'($urandom);
    expf[NB-1 -: 24] = {16'hB38F, st};
    for (int i = 0; i < NW; i++) expf[16 * (NW - 1 - i) +: 16] = d[i];
    got.delete(); last_strobe = -1; cur_sel = sel;
    @(negedge clk);
    radio_sel = sel; data = d; status = st; load = 1;
    @(negedge clk); load = 0;
    // the data inputs may change once the set is latched
    foreach (data[i]) data[i] = ~d[i];
    checks++; if (!busy) begin failures++; $display("not busy after load"); end
    repeat (10) @(negedge clk);
    load = 1; @(negedge clk); load = 0;   // offered while busy: skipped
    while (busy && wait_cyc < 100000) begin @(negedge clk); wait_cyc++; end
    checks++;
    if (got.size() != NB) begin failures++; $display("%0d bits captured", got.size()); end
    else begin
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (got[b] != expf[NB - 1 - b]) begin failures++; $display("bit %0d wrong", b); end
      end
    end
    repeat (2) @(negedge clk);
    checks++;
    if (int'(frames) != n_before + 1) begin failures++; $display("frames %0d", frames); end
  endtask

  initial begin
    foreach (data[i]) data[i] = '0;
    status = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(0, 0);
    frame(1, 1);
    frame(0, 2);
    checks++;
    if (skipped != 3) begin failures++; $display("skipped %0d", skipped); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
