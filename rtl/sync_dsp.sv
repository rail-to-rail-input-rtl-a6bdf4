// sync_dsp: the three-core phase-synchrony processor that detects the onset
// of a seizure from two selected, band-pass filtered channels.
//
// For every FIR frame it receives one filtered sample of each channel of the
// pair (ya, yb).  The in-phase value of a channel is its previous sample
// y[n-1]; the quadrature value is the central difference y[n-2] - y[n], which
// is 90 degrees away at every frequency (its amplitude is 2*sin(wT) times
// that of I).  Then:
//  * core 1 (CORDIC vectoring) gives the 8-bit phase of channel a, then of b;
//  * core 2 (CORDIC rotation) turns the phase difference into a unit phasor
//    (amplitude 256) that is accumulated over `win` frames;
//  * core 3 (CORDIC vectoring) takes the magnitude of the accumulated phasor,
//    which is 256 * win * (mean phase coherence), removes the CORDIC gain,
//    and compares it with thr * win, thr being the coherence threshold in
//    1/256 units.  `detect` pulses when the threshold is reached.
// The division into these three cores, the quadrature rule and the scaling
// are this design's choices; the chip only states a CORDIC-based synchrony
// indicator with a threshold programmed per subject.
// Timing: phases are ready about 2*(ITER+2) cycles after `frame`, plv_valid
// and detect about 4*(ITER+2) cycles after the last frame of a window.  A
// frame that arrives while the cores are busy is ignored.
module sync_dsp
  import ns_pkg::*;
#(
  parameter int W    = 24,  // CORDIC operand width
  parameter int ITER = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         frame,
  input  acc_t         ya,
  input  acc_t         yb,
  input  logic [8:0]   thr,      // coherence threshold, 256 = 1.0
  input  logic [8:0]   win,      // frames per coherence window (>= 1)
  output logic [7:0]   phase_a,
  output logic [7:0]   phase_b,
  output logic         phase_valid,
  output logic [W-1:0] plv,      // 256 * win * coherence
  output logic         plv_valid,
  output logic         detect
);
  localparam logic signed [W-1:0] UNIT = W'(155);   // 256 / 1.6468

  typedef enum logic [2:0] {S_IDLE, S_A, S_B, S_ROT, S_PLV} state_t;
  state_t state;

  acc_t a1, a2, b1, b2;
  logic signed [W-1:0] ia, qa, ib, qb;
  logic signed [W-1:0] sum_c, sum_s;
  logic [8:0]  nfr;
  logic [7:0]  dphi;

  logic        c1_start, c2_start, c3_start, c1_mode_b;
  logic        c1_done, c2_done, c3_done, c1_busy, c2_busy, c3_busy;
  logic signed [W+1:0] c1_x, c1_y, c2_x, c2_y, c3_x, c3_y;
  logic [7:0]  c1_ang, c2_ang, c3_ang;
  logic [W+16:0] plv_full;

  cordic #(.W(W), .ITER(ITER)) u_core1 (
    .clk, .rst_n, .start(c1_start), .mode_rot(1'b0),
    .x_in(c1_mode_b ? ib : ia), .y_in(c1_mode_b ? qb : qa), .ang_in(8'h00),
    .busy(c1_busy), .done(c1_done), .x_out(c1_x), .y_out(c1_y), .ang_out(c1_ang)
  );
  cordic #(.W(W), .ITER(ITER)) u_core2 (
    .clk, .rst_n, .start(c2_start), .mode_rot(1'b1),
    .x_in(UNIT), .y_in('0), .ang_in(dphi),
    .busy(c2_busy), .done(c2_done), .x_out(c2_x), .y_out(c2_y), .ang_out(c2_ang)
  );
  cordic #(.W(W), .ITER(ITER)) u_core3 (
    .clk, .rst_n, .start(c3_start), .mode_rot(1'b0),
    .x_in(sum_c), .y_in(sum_s), .ang_in(8'h00),
    .busy(c3_busy), .done(c3_done), .x_out(c3_x), .y_out(c3_y), .ang_out(c3_ang)
  );

  // magnitude without the CORDIC gain: x * 0.60725 (39797 / 65536)
  assign plv_full = (W + 17)'($unsigned(c3_x[W-1:0])) * (W + 17)'(39797);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a1 <= '0; a2 <= '0; b1 <= '0; b2 <= '0;
      ia <= '0; qa <= '0; ib <= '0; qb <= '0;
      sum_c <= '0; sum_s <= '0; nfr <= '0; dphi <= '0;
      c1_start <= 1'b0; c2_start <= 1'b0; c3_start <= 1'b0; c1_mode_b <= 1'b0;
      phase_a <= '0; phase_b <= '0; phase_valid <= 1'b0;
      plv <= '0; plv_valid <= 1'b0; detect <= 1'b0;
    end else begin
      c1_start <= 1'b0; c2_start <= 1'b0; c3_start <= 1'b0;
      phase_valid <= 1'b0; plv_valid <= 1'b0; detect <= 1'b0;
      if (c3_done) begin   // core 3 finishes in the background
        plv       <= plv_full[W+15:16];
        plv_valid <= 1'b1;
        detect    <= (plv_full[W+15:16] >= W'(thr) * W'(win));
      end
      case (state)
        S_IDLE: if (frame && en) begin
          a1 <= ya; a2 <= a1; b1 <= yb; b2 <= b1;
          ia <= W'(a1); qa <= W'(a2) - W'(ya);
          ib <= W'(b1); qb <= W'(b2) - W'(yb);
          c1_mode_b <= 1'b0;
          c1_start  <= 1'b1;
          state     <= S_A;
        end
        S_A: if (c1_done) begin
          phase_a   <= c1_ang;
          c1_mode_b <= 1'b1;
          c1_start  <= 1'b1;
          state     <= S_B;
        end
        S_B: if (c1_done) begin
          phase_b     <= c1_ang;
          phase_valid <= 1'b1;
          dphi        <= phase_a - c1_ang;
          c2_start    <= 1'b1;
          state       <= S_ROT;
        end
        S_ROT: if (c2_done) begin
          if (nfr + 1'b1 >= win) begin
            sum_c    <= sum_c + W'(c2_x);
            sum_s    <= sum_s + W'(c2_y);
            nfr      <= '0;
            state    <= S_PLV;
          end else begin
            sum_c <= sum_c + W'(c2_x);
            sum_s <= sum_s + W'(c2_y);
            nfr   <= nfr + 1'b1;
            state <= S_IDLE;
          end
        end
        S_PLV: begin
          c3_start <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      // the window sums are handed to core 3 and restart
      if (c3_start) begin
        sum_c <= '0;
        sum_s <= '0;
      end
    end
  end
endmodule
