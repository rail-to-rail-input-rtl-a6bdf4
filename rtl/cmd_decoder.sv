// cmd_decoder: turns the command bitstream recovered from the amplitude-shift
// keyed inductive power link into register writes.
//
// The demodulator delivers one bit per recovered clock strobe (bit_valid).
// The decoder hunts for the sync byte 8'hA5, then shifts in a 16-bit address,
// a 16-bit data word and an even-parity bit, MSB first.  A frame whose parity
// holds produces a one-cycle `wr` with addr/data; a frame that fails is
// dropped and counted in `errors`.  Either way the decoder hunts for the next
// sync byte.  The frame format is this design's own.
module cmd_decoder #(
  parameter logic [7:0] SYNC = 8'hA5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_in,
  input  logic        bit_valid,
  output logic        wr,
  output logic [15:0] addr,
  output logic [15:0] data,
  output logic [7:0]  errors
);
  logic [7:0]  hunt;
  logic [32:0] sh;
  logic [5:0]  n;
  logic        in_frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hunt <= '0; sh <= '0; n <= '0; in_frame <= 1'b0;
      wr <= 1'b0; addr <= '0; data <= '0; errors <= '0;
    end else begin
      wr <= 1'b0;
      if (bit_valid) begin
        if (!in_frame) begin
          hunt <= {hunt[6:0], bit_in};
          if ({hunt[6:0], bit_in} == SYNC) begin
            in_frame <= 1'b1;
            n        <= '0;
          end
        end else begin
          sh <= {sh[31:0], bit_in};
          n  <= n + 1'b1;
          if (n == 6'd32) begin
            in_frame <= 1'b0;
            hunt     <= '0;
            if (^{sh[31:0], bit_in} == 1'b0) begin
              wr   <= 1'b1;
              addr <= sh[31:16];
              data <= sh[15:0];
            end else begin
              errors <= errors + 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
