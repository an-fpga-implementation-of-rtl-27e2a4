// phase_dds: direct digital synthesizer of the carrier loop, i.e. the phase
// accumulator that turns loop-filter outputs into the phase estimate theta.
//
//   theta(k+1) = wrap( theta(k) + K0*v(k) + c(k) ),   K0 = 1
// wrap() brings the sum back into [-pi, pi] (one add or subtract of 2*pi is
// enough for every input this block can get), so the CORDIC never sees an
// angle outside its range. c(k) is the phase-ambiguity correction: when the
// frame-marker detector reports that the marker arrived rotated by m*30
// degrees, m*pi/6 is added once. The wrap and the place of the correction
// follow the thesis; the formats are this design's: theta is kept as Q3.28
// radians (32 bits) and its top 16 bits (Q3.12) drive the rotator.
//
// Interface: v_valid/v update the accumulator; asm_found/asm_idx apply a
// correction (both may come in the same cycle). theta_valid pulses one cycle
// after every change. Reset clears theta.
module phase_dds
  import apsk_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       v_valid,
  input  loop_t      v,
  input  logic       asm_found,
  input  logic [3:0] asm_idx,
  output logic       theta_valid,
  output loop_t      theta,       // Q3.28 radians
  output angle_t     theta_q12,   // Q3.12 radians
  output logic       wrapped      // pulses when the last update wrapped
);

  logic signed [33:0] corr, sum, wrapped_sum;

  assign corr = asm_found ? 34'(asm_idx) * PI6_Q28 : '0;
  assign sum  = 34'(theta) + (v_valid ? 34'(v) : '0) + corr;

  always_comb begin
    if (sum > PI_Q28)        wrapped_sum = sum - (PI_Q28 <<< 1);
    else if (sum < -PI_Q28)  wrapped_sum = sum + (PI_Q28 <<< 1);
    else                     wrapped_sum = sum;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      theta       <= '0;
      theta_valid <= 1'b0;
      wrapped     <= 1'b0;
    end else begin
      theta_valid <= v_valid | asm_found;
      wrapped     <= 1'b0;
      if (v_valid || asm_found) begin
        theta   <= loop_t'(wrapped_sum);
        wrapped <= (wrapped_sum != sum);
      end
    end
  end

  assign theta_q12 = theta[31:16];

endmodule
