// apsk_decision: maximum-likelihood 16-APSK symbol decision.
//
// The nearest point minimizes |r - a|^2, which is the same as maximizing
// <r,a> - |a|^2/2, so each candidate needs two products and two additions and
// the |a|^2/2 terms are constants. The constellation labelling makes the two
// LSBs the quadrant, so the decision works on (|I|, |Q|) against the four
// first-quadrant points only (argmax of four metrics), and the quadrant bits
// are the signs of I and Q. Both reductions follow the thesis; ties go to
// the lower-numbered candidate in the order 01, 00, 10, 11.
//
// Interface: en marks an input to decide (the strobe-qualified interpolant).
// out_valid follows en by one cycle with the label (bits) and the decided
// point's coordinates (a_hat, Q2.13).
module apsk_decision
  import apsk_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  input  cplx_t     in_r,
  output logic      out_valid,
  output sym_bits_t bits,
  output cplx_t     a_hat
);

  typedef logic signed [33:0] metric_t;

  logic [15:0] abs_i, abs_q;
  assign abs_i = in_r.i[15] ? 16'(-in_r.i) : 16'(in_r.i);
  assign abs_q = in_r.q[15] ? 16'(-in_r.q) : 16'(in_r.q);

  function automatic metric_t metric(logic [1:0] msb, logic [15:0] x, logic [15:0] y);
    cplx_t   p;
    metric_t e_half;
    p      = quadrant1_point(msb);
    e_half = (metric_t'(p.i) * metric_t'(p.i) + metric_t'(p.q) * metric_t'(p.q)) >>> 1;
    return metric_t'($signed({1'b0, x})) * metric_t'(p.i)
         + metric_t'($signed({1'b0, y})) * metric_t'(p.q) - e_half;
  endfunction

  logic [1:0] best;
  always_comb begin
    metric_t m, bm;
    logic [1:0] cand [4];
    cand = '{2'b01, 2'b00, 2'b10, 2'b11};
    best = cand[0];
    bm   = metric(cand[0], abs_i, abs_q);
    for (int k = 1; k < 4; k++) begin
      m = metric(cand[k], abs_i, abs_q);
      if (m > bm) begin
        bm   = m;
        best = cand[k];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      bits      <= '0;
      a_hat     <= '0;
    end else begin
      out_valid <= en;
      if (en) begin
        bits  <= {best, in_r.i[15], in_r.q[15]};
        a_hat <= point_of({best, in_r.i[15], in_r.q[15]});
      end
    end
  end

endmodule
