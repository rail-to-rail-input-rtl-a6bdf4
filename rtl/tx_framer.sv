// tx_framer: packs recorded data and status into frames and shifts them out
// to one of the two ultra-wideband transmitters.
//
// The chip carries a low-power delay-based transmitter for a receiver on the
// skin (short range) and a VCO-based one for a receiver across the room (long
// range); radio_sel picks one, and the other's data line stays low.  A frame
// is the 16-bit sync word 16'hB38F, an 8-bit status byte and NW 16-bit data
// words, MSB first.
//
// The radios run far faster than the recording channels (megabits per second
// against a 1 MHz modulator clock), so the framer has two clock domains:
//  * clk side: `load` latches a new data set into the frame register when the
//    framer is idle and toggles a request; a set offered while a frame is
//    still going out (`busy`) is not sent and is counted in `skipped`;
//    `frames` counts the frames whose last bit has gone out.
//  * tx_clk side: after two synchroniser flops the request starts the shift;
//    one bit goes out every DIV_SHORT or DIV_LONG tx_clk cycles, and
//    bit_strobe (tx_clk domain) marks the first cycle of each bit.  After the
//    last bit an acknowledge toggle goes back through two flops and ends
//    `busy`.
// The frame register and radio choice do not change while busy, so the
// transmit side may read them directly.  Frame format, bit periods and the
// handshake are this design's own.
module tx_framer #(
  parameter int NW        = 64,
  parameter int DIV_SHORT = 1,
  parameter int DIV_LONG  = 1
) (
  input  logic              clk,
  input  logic              tx_clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              radio_sel,
  input  logic              load,
  input  logic [15:0]       data [NW],
  input  logic [7:0]        status,
  output logic              tx_short_bit,
  output logic              tx_long_bit,
  output logic              bit_strobe,
  output logic              busy,
  output logic [15:0]       frames,
  output logic [15:0]       skipped
);
  localparam int NBITS = 24 + 16 * NW;
  localparam int BW    = $clog2(NBITS + 1);
  localparam int DW    = $clog2((DIV_SHORT > DIV_LONG ? DIV_SHORT : DIV_LONG) + 1);

  logic [NBITS-1:0] packed_in, frame_q;
  logic             sel_q;

  always_comb begin
    packed_in = '0;
    packed_in[NBITS-1 -: 24] = {16'hB38F, status};
    for (int i = 0; i < NW; i++)
      packed_in[16 * (NW - 1 - i) +: 16] = data[i];
  end

  // ---- clk side
  logic req_t, ack_s1, ack_s2, ack_s3;
  logic ack_t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q <= '0; sel_q <= 1'b0; req_t <= 1'b0;
      ack_s1 <= 1'b0; ack_s2 <= 1'b0; ack_s3 <= 1'b0;
      frames <= '0; skipped <= '0;
    end else begin
      ack_s1 <= ack_t;
      ack_s2 <= ack_s1;
      ack_s3 <= ack_s2;
      if (ack_s2 != ack_s3) frames <= frames + 1'b1;
      if (load && en) begin
        if (busy) skipped <= skipped + 1'b1;
        else begin
          frame_q <= packed_in;
          sel_q   <= radio_sel;
          req_t   <= ~req_t;
        end
      end
    end
  end

  assign busy = (req_t != ack_s2);

  // the transmit side reads frame_q and sel_q unsynchronised: they must hold
  // still for as long as a frame is in flight (checked from the second cycle
  // after reset on)
  logic chk_armed;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) chk_armed <= 1'b0;
    else        chk_armed <= 1'b1;

  a_frame_stable: assert property (@(posedge clk)
    chk_armed && $past(busy) |-> ($stable(frame_q) && $stable(sel_q)));

  // ---- tx_clk side
  logic          req_s1, req_s2, req_seen;
  logic [BW-1:0] left, pos;
  logic [DW-1:0] div_cnt;

  always_ff @(posedge tx_clk or negedge rst_n) begin
    if (!rst_n) begin
      req_s1 <= 1'b0; req_s2 <= 1'b0; req_seen <= 1'b0; ack_t <= 1'b0;
      left <= '0; pos <= '0; div_cnt <= '0; bit_strobe <= 1'b0;
    end else begin
      req_s1     <= req_t;
      req_s2     <= req_s1;
      bit_strobe <= 1'b0;
      if (left == '0) begin
        if (req_s2 != req_seen) begin
          req_seen   <= req_s2;
          left       <= BW'(NBITS);
          pos        <= BW'(NBITS - 1);
          div_cnt    <= '0;
          bit_strobe <= 1'b1;
        end
      end else if (div_cnt + 1'b1 >= DW'(sel_q ? DIV_LONG : DIV_SHORT)) begin
        div_cnt <= '0;
        pos     <= pos - 1'b1;
        left    <= left - 1'b1;
        if (left == BW'(1)) ack_t      <= req_seen;
        else                bit_strobe <= 1'b1;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

  logic cur_bit;
  assign cur_bit      = (left != '0) && frame_q[pos];
  assign tx_short_bit = cur_bit && !sel_q;
  assign tx_long_bit  = cur_bit &&  sel_q;
endmodule
