// cmd_decoder_tb: sends command frames (sync 0xA5, address, data, even
// parity) separated by random idle bits and random gaps in bit_valid; every
// good frame must produce exactly one write with its address and data, and
// frames with a wrong parity bit none, counted as errors.
module cmd_decoder_tb;
  logic clk = 0, rst_n = 0, bit_in = 0, bit_valid = 0;
  logic wr;
  logic [15:0] addr, data;
  logic [7:0] errors;
  int checks = 0, failures = 0, nwr = 0, nexp = 0, nbad = 0;
  logic [15:0] qa [$], qd [$];

  cmd_decoder dut (.clk, .rst_n, .bit_in, .bit_valid, .wr, .addr, .data, .errors);
  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (wr) begin
    nwr++;
    checks++;
    if (qa.size() == 0) failures++;
    else begin
      automatic logic [15:0] ea = qa.pop_front(), ed = qd.pop_front();
      if (addr != ea || data != ed) begin failures++; $display("wr %h %h exp %h %h", addr, data, ea, ed); end
    end
  end

  task automatic send_bit(input bit b);
    @(negedge clk);
    bit_in = b; bit_valid = 1;
    @(negedge clk);
    bit_valid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  task automatic send_frame(input logic [15:0] a, input logic [15:0] d, input bit corrupt);
    logic [40:0] f;
    f = {8'hA5, a, d, (^{a, d}) ^ corrupt};
    for (int i = 40; i >= 0; i--) send_bit(f[i]);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      automatic logic [15:0] a = 16'($urandom), d = 16'($urandom);
      automatic bit bad = ($urandom_range(0, 5) == 0);
      repeat ($urandom_range(0, 6)) send_bit(1'b0);
      if (!bad) begin qa.push_back(a); qd.push_back(d); nexp++; end else nbad++;
      send_frame(a, d, bad);
    end
    repeat (5) @(negedge clk);
    checks += 2;
    if (nwr != nexp) begin failures++; $display("writes %0d exp %0d", nwr, nexp); end
    if (int'(errors) != nbad) begin failures++; $display("errors %0d exp %0d", errors, nbad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
