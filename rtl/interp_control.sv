// interp_control: modulo-1 decrementing counter of the timing loop. It marks
// the symbol-time samples (strobe) and supplies the fractional interval mu.
//
// For every sample the counter is updated as
//   eta(n+1) = (eta(n) - (v(n) + 1/D)) mod 1,   D = 2 samples per symbol,
// so it underflows once per symbol on average; v(n), the loop-filter output,
// speeds it up or slows it down. The difference eta(n) - 1/D is formed as
// soon as the previous update is done, so only one subtraction of v remains
// when v arrives. The sign of the difference (before the wrap) is the
// underflow flag; the wrap itself clears the sign and integer bits and keeps
// the fraction bits. On underflow mu = eta(n) / (v(n) + 1/D) is approximated
// by mu = 2*eta(n), a shift, and the strobe is set for the next sample;
// otherwise mu is held. All of this follows the thesis.
//
// Formats: eta and v are Q2.30 (bit 31 sign, bit 30 integer). mu is unsigned
// Q0.16; 2*eta values of 1 or more saturate to 0xFFFF. Reset loads eta = 1/2,
// mu = 0 and strobe = 0 (reset values are this design's choice).
// Interface: in_valid/v, one per sample; out_valid one cycle later with the
// strobe that applies to the next sample and the current mu.
module interp_control
  import apsk_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  loop_t       v,
  output logic        out_valid,
  output logic        strobe,
  output logic [15:0] mu
);

  localparam loop_t HALF = 32'sh2000_0000;     // 1/D = 1/2 in Q2.30

  loop_t eta, eta_minus_half, next_raw;

  assign eta_minus_half = eta - HALF;          // pre-computed part
  assign next_raw       = eta_minus_half - v;

  always_ff @(posedge clk) begin
    if (rst) begin
      eta       <= HALF;
      mu        <= '0;
      strobe    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        eta    <= {2'b00, next_raw[29:0]};
        strobe <= next_raw[31];
        if (next_raw[31]) begin
          // mu = 2*eta, eta in [0, 2): bits 30..29 nonzero means mu >= 1
          if (eta[30] || eta[29]) mu <= 16'hFFFF;
          else                    mu <= eta[28:13];
        end
      end
    end
  end

endmodule
