// zc_ted: zero-crossing timing error detector (two samples per symbol) with a
// precomputed error table.
//
//   e(k) = x_mid * (a_I(k-1) - a_I(k)) + y_mid * (a_Q(k-1) - a_Q(k))
// where x_mid + j y_mid is the interpolant halfway between symbols k-1 and k.
// Everything in e(k) except the new decision a(k) is known once the
// mid-symbol interpolant arrives, so on that sample the detector computes the
// error for each of the 16 possible decisions and registers the table; when
// the decision arrives it only selects an entry. The table approach follows
// the thesis; the number formats are this design's own.
//
// Interface (all in the fast clock domain):
//   smp_valid/strobe  a new interpolant; strobe = 1 marks a symbol-time one
//   dec_valid/bits/a_hat  the decision for the last symbol-time interpolant
//   out_valid/e       one error per interpolant: 0 one cycle after a
//                     mid-symbol interpolant, the table entry one cycle
//                     after the decision for a symbol-time interpolant.
// e is Q4.11, saturated. The detector gain Kp (2.68 in the thesis) is not a
// multiplier here; it is part of the loop-filter constants.
module zc_ted
  import apsk_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      smp_valid,
  input  logic      strobe,
  input  cplx_t     smp,
  input  logic      dec_valid,
  input  sym_bits_t bits,
  input  cplx_t     a_hat,
  output logic      out_valid,
  output err_t      e
);

  localparam int EF = 11;

  err_t  table_q [16];
  cplx_t a_prev;

  function automatic err_t table_entry(cplx_t mid, cplx_t prev, sym_bits_t cand);
    cplx_t a;
    logic signed [34:0] acc;
    logic signed [34:0] r;
    a   = point_of(cand);
    acc = 35'(mid.i) * (35'(prev.i) - 35'(a.i)) + 35'(mid.q) * (35'(prev.q) - 35'(a.q));
    r   = (acc + (35'sd1 <<< (2*SF - EF - 1))) >>> (2*SF - EF);
    if (r > 35'sd32767)       return err_t'(32767);
    else if (r < -35'sd32768) return err_t'(-32768);
    else                      return err_t'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 16; k++) table_q[k] <= '0;
      a_prev    <= '0;
      out_valid <= 1'b0;
      e         <= '0;
    end else begin
      out_valid <= 1'b0;
      if (smp_valid && !strobe) begin
        for (int k = 0; k < 16; k++) table_q[k] <= table_entry(smp, a_prev, sym_bits_t'(k));
        out_valid <= 1'b1;
        e         <= '0;
      end
      if (dec_valid) begin
        out_valid <= 1'b1;
        e         <= table_q[bits];
        a_prev    <= a_hat;
      end
    end
  end

endmodule
