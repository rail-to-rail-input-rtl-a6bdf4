// cordic: iterative CORDIC engine, one micro-rotation per clock, used by the
// phase-synchrony processor in both of its modes.
//
//  * vectoring (mode_rot = 0): rotates (x_in, y_in) onto the positive x axis;
//    x_out = K * |v| and ang_out = atan2(y_in, x_in).
//  * rotation (mode_rot = 1): rotates (x_in, y_in) by ang_in;
//    (x_out, y_out) = K * R(ang_in) * v.
// K = 1.6468 is the CORDIC gain.  Angles are 8-bit fractions of a turn
// (256 = 360 degrees), matching the chip's 8-bit phase output; inside, the
// angle is kept to 1/65536 turn.  Vectors outside the right half plane are
// first turned by 180 degrees, so all four quadrants work.  The table holds
// atan(2^-i) / (2*pi) * 65536, rounded.
// Timing: `start` loads the operands (ignored while busy); `done` pulses
// ITER+2 cycles after the start cycle with the results, which then stay until the next start.
// Outputs are W+2 bits wide to hold the gain.
module cordic #(
  parameter int W    = 24,   // operand width
  parameter int ITER = 12    // micro-rotations (at most 14)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  mode_rot,
  input  logic signed [W-1:0]   x_in,
  input  logic signed [W-1:0]   y_in,
  input  logic [7:0]            ang_in,
  output logic                  busy,
  output logic                  done,
  output logic signed [W+1:0]   x_out,
  output logic signed [W+1:0]   y_out,
  output logic [7:0]            ang_out
);
  localparam int IW = W + 2;

  function automatic logic signed [15:0] atan_tab(input int i);
    case (i)
      0: atan_tab = 16'sd8192;  1: atan_tab = 16'sd4836;
      2: atan_tab = 16'sd2555;  3: atan_tab = 16'sd1297;
      4: atan_tab = 16'sd651;   5: atan_tab = 16'sd326;
      6: atan_tab = 16'sd163;   7: atan_tab = 16'sd81;
      8: atan_tab = 16'sd41;    9: atan_tab = 16'sd20;
      10: atan_tab = 16'sd10;   11: atan_tab = 16'sd5;
      12: atan_tab = 16'sd3;    13: atan_tab = 16'sd1;
      default: atan_tab = 16'sd0;
    endcase
  endfunction

  logic signed [IW-1:0] x, y, xs, ys;
  logic signed [15:0]   z, z0;
  logic [3:0]           it;
  logic                 rot;
  logic                 dpos;
  logic [15:0]          zr;

  assign z0   = {ang_in, 8'h00};
  assign xs   = x >>> it;
  assign ys   = y >>> it;
  assign dpos = rot ? (z >= 0) : (y < 0);   // direction of this micro-rotation
  assign zr   = z + 16'sd128;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; it <= '0; rot <= 1'b0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          rot  <= mode_rot;
          it   <= '0;
          if (mode_rot) begin
            if (ang_in[7] != ang_in[6]) begin   // 90..270 degrees
              x <= -IW'(x_in); y <= -IW'(y_in); z <= z0 - 16'sh8000;
            end else begin
              x <= IW'(x_in);  y <= IW'(y_in);  z <= z0;
            end
          end else begin
            if (x_in < 0) begin
              x <= -IW'(x_in); y <= -IW'(y_in); z <= 16'sh8000;
            end else begin
              x <= IW'(x_in);  y <= IW'(y_in);  z <= '0;
            end
          end
        end
      end else if (int'(it) == ITER) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        it <= it + 1'b1;
        if (dpos) begin   // counter-clockwise, angle left to do shrinks
          x <= x - ys; y <= y + xs;
          z <= z - atan_tab(int'(it));
        end else begin
          x <= x + ys; y <= y - xs;
          z <= z + atan_tab(int'(it));
        end
      end
    end
  end

  assign x_out   = x;
  assign y_out   = y;
  // vectoring: z ends at the input's angle; rotation: z ends near zero
  assign ang_out = zr[15:8];
endmodule
