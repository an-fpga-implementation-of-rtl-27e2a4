// ccw_cordic: counter-clockwise rotation of a complex sample by an angle,
// computed with the CORDIC algorithm.
//
// The rotation [x';y'] = [cos t, -sin t; sin t, cos t][x;y] is approximated by
// NITER micro-rotations with tan(theta_i) = +-2^-i, i = 1..NITER, each of
// which is a shift and an add. The direction of each step is the sign of the
// angle still to be rotated. The gain term 1/sqrt(1+2^-2i) is left out, so the
// result is scaled by Z = prod sqrt(1+2^-2i) (1.16444 for NITER = 11); the
// matched filter's coefficients carry 1/Z instead. NITER = 11 and the dropped
// gain follow the thesis.
//
// Micro-rotations starting at i = 1 converge only for |t| < 0.9987 rad, while
// the angle input spans [-pi, pi]. A first stage therefore rotates by the
// nearest multiple of 90 degrees exactly (swap and negate) and leaves a
// residual within +-pi/4; this pre-rotation is this design's own choice. The
// residual angle is carried with 16 fraction bits and the vector with two
// guard bits; the output is saturated to Q2.13.
//
// Interface: angle in Q3.12 radians. Fully pipelined, one stage per
// iteration: out_valid follows in_valid by NITER+1 cycles and a new sample
// may enter every cycle.
module ccw_cordic
  import apsk_pkg::*;
#(
  parameter int NITER = 11
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  cplx_t  in_r,
  input  angle_t in_theta,
  output logic   out_valid,
  output cplx_t  out_r
);

  localparam int XW = 18;                     // vector width with guard bits
  localparam int ZW = 20;                     // residual angle, Q3.16
  localparam logic signed [ZW-1:0] HALF_PI = 20'sd102944;   // pi/2 * 2^16
  localparam logic signed [ZW-1:0] QUART_PI = 20'sd51472;   // pi/4 * 2^16

  // atan(2^-i) * 2^16 for i = 1..16
  function automatic logic signed [ZW-1:0] atan_tab(int i);
    case (i)
      1: return 20'sd30386;   2: return 20'sd16055;   3: return 20'sd8150;
      4: return 20'sd4091;    5: return 20'sd2047;    6: return 20'sd1024;
      7: return 20'sd512;     8: return 20'sd256;     9: return 20'sd128;
      10: return 20'sd64;     11: return 20'sd32;     12: return 20'sd16;
      13: return 20'sd8;      14: return 20'sd4;      15: return 20'sd2;
      default: return 20'sd1;
    endcase
  endfunction

  logic signed [XW-1:0] xs [NITER+1];
  logic signed [XW-1:0] ys [NITER+1];
  logic signed [ZW-1:0] zs [NITER+1];
  logic                 vs [NITER+1];

  // stage 0: exact rotation by a multiple of 90 degrees
  logic signed [ZW-1:0] z_in;
  logic signed [XW-1:0] x_in, y_in;
  assign z_in = ZW'(in_theta) <<< 4;
  assign x_in = XW'(in_r.i);
  assign y_in = XW'(in_r.q);

  always_ff @(posedge clk) begin
    if (rst) begin
      vs[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      if (z_in > QUART_PI + HALF_PI) begin          // near +pi
        xs[0] <= -x_in;  ys[0] <= -y_in;  zs[0] <= z_in - (HALF_PI <<< 1);
      end else if (z_in > QUART_PI) begin           // near +pi/2
        xs[0] <= -y_in;  ys[0] <= x_in;   zs[0] <= z_in - HALF_PI;
      end else if (z_in < -(QUART_PI + HALF_PI)) begin
        xs[0] <= -x_in;  ys[0] <= -y_in;  zs[0] <= z_in + (HALF_PI <<< 1);
      end else if (z_in < -QUART_PI) begin          // near -pi/2
        xs[0] <= y_in;   ys[0] <= -x_in;  zs[0] <= z_in + HALF_PI;
      end else begin
        xs[0] <= x_in;   ys[0] <= y_in;   zs[0] <= z_in;
      end
    end
  end

  // stages 1..NITER: micro-rotations
  for (genvar s = 1; s <= NITER; s++) begin : g_stage
    always_ff @(posedge clk) begin
      if (rst) begin
        vs[s] <= 1'b0;
        xs[s] <= '0;
        ys[s] <= '0;
        zs[s] <= '0;
      end else begin
        vs[s] <= vs[s-1];
        if (zs[s-1] >= 0) begin
          xs[s] <= xs[s-1] - (ys[s-1] >>> s);
          ys[s] <= ys[s-1] + (xs[s-1] >>> s);
          zs[s] <= zs[s-1] - atan_tab(s);
        end else begin
          xs[s] <= xs[s-1] + (ys[s-1] >>> s);
          ys[s] <= ys[s-1] - (xs[s-1] >>> s);
          zs[s] <= zs[s-1] + atan_tab(s);
        end
      end
    end
  end

  function automatic sample_t sat16(logic signed [XW-1:0] v);
    if (v > XW'(32767))       return sample_t'(32767);
    else if (v < -XW'(32768)) return sample_t'(-32768);
    else                      return sample_t'(v);
  endfunction

  assign out_valid = vs[NITER];
  assign out_r.i   = sat16(xs[NITER]);
  assign out_r.q   = sat16(ys[NITER]);

endmodule
