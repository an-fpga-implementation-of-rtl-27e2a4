// farrow_interp: piecewise-quadratic interpolator in Farrow form, applied to
// the I and Q rails with a common fractional interval mu.
//
// With the four newest samples d0 (newest) .. d3, the interpolant between d2
// (base point, mu = 0) and d1 (mu = 1) is
//   out = (v2*mu + v1)*mu + v0
//   v2 = a*( d0 - d1 - d2 + d3)
//   v1 = a*(-d0 + d1 + d2 - d3) + d1 - d2
//   v0 = d2
// with a = 1/2, which is the thesis's coefficient table written out; the
// halving is a shift. v2, v1 and v0 only depend on stored samples, so they
// are formed (and registered) as soon as a sample arrives, and only the two
// multiplications by mu remain when the interpolant is requested, which keeps
// the loop latency short.
//
// Interface: in_valid shifts a new sample in; the partial sums are registered
// on the next cycle, the interpolant on the one after, and out_valid is high
// three cycles after in_valid. mu is unsigned Q0.16 and is read two cycles
// after in_valid; it must be stable then.
module farrow_interp
  import apsk_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  cplx_t       in_r,
  input  logic [15:0] mu,
  output logic        out_valid,
  output cplx_t       out_r
);

  localparam int PW = 19;              // partial-sum width, SF fraction bits

  typedef struct packed {
    logic signed [PW-1:0] v2;
    logic signed [PW-1:0] v1;
    logic signed [PW-1:0] v0;
  } farrow_terms_t;

  sample_t       di [4];
  sample_t       dq [4];
  farrow_terms_t ti, tq;
  logic          have_terms;

  function automatic farrow_terms_t terms(sample_t d0, sample_t d1,
                                          sample_t d2, sample_t d3);
    farrow_terms_t t;
    logic signed [PW-1:0] e0, e1, e2, e3;
    e0 = PW'(d0); e1 = PW'(d1); e2 = PW'(d2); e3 = PW'(d3);
    t.v2 = (e0 - e1 - e2 + e3) >>> 1;
    t.v1 = ((-e0 + e1 + e2 - e3) >>> 1) + e1 - e2;
    t.v0 = e2;
    return t;
  endfunction

  function automatic sample_t evaluate(farrow_terms_t t, logic [15:0] m);
    logic signed [PW+17:0] p;
    logic signed [PW+1:0]  a;
    p = (PW+18)'(t.v2) * $signed({2'b00, m});
    a = (PW+2)'(p >>> 16) + (PW+2)'(t.v1);
    p = (PW+18)'(a) * $signed({2'b00, m});
    a = (PW+2)'(p >>> 16) + (PW+2)'(t.v0);
    if (a > (PW+2)'(32767))       return sample_t'(32767);
    else if (a < -(PW+2)'(32768)) return sample_t'(-32768);
    else                          return sample_t'(a);
  endfunction

  logic eval_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) begin
        di[k] <= '0;
        dq[k] <= '0;
      end
      ti         <= '0;
      tq         <= '0;
      have_terms <= 1'b0;
      eval_q     <= 1'b0;
      out_valid  <= 1'b0;
      out_r      <= '0;
    end else begin
      if (in_valid) begin
        di <= '{in_r.i, di[0], di[1], di[2]};
        dq <= '{in_r.q, dq[0], dq[1], dq[2]};
      end
      // cycle 1: terms that depend only on stored samples
      have_terms <= in_valid;
      if (have_terms) begin
        ti <= terms(di[0], di[1], di[2], di[3]);
        tq <= terms(dq[0], dq[1], dq[2], dq[3]);
      end
      // cycle 2: the two multiplications by mu
      eval_q    <= have_terms;
      out_valid <= eval_q;
      if (eval_q) begin
        out_r.i <= evaluate(ti, mu);
        out_r.q <= evaluate(tq, mu);
      end
    end
  end

endmodule
