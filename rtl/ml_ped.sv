// ml_ped: maximum-likelihood phase error detector for the carrier loop.
//
//   e(k) = y'(k) * a_I(k) - x'(k) * a_Q(k)
// where x' + j y' is the rotated, interpolated symbol-time sample and a(k) its
// decision. For a small phase error e is |a|^2 times the sine of the error,
// so the detector needs no division or arctangent. The formula is the
// thesis's; the detector gain Kp = 1 is implicit.
//
// Interface: en (a new decision) samples r and a_hat; out_valid follows one
// cycle later with e in Q2.13, rounded and saturated to 16 bits.
module ml_ped
  import apsk_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  cplx_t in_r,
  input  cplx_t a_hat,
  output logic  out_valid,
  output err_t  e
);

  logic signed [33:0] prod, rounded;
  assign prod = 34'(in_r.q) * 34'(a_hat.i) - 34'(in_r.i) * 34'(a_hat.q);
  assign rounded = (prod + 34'sd4096) >>> SF;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      e         <= '0;
    end else begin
      out_valid <= en;
      if (en) begin
        if (rounded > 34'sd32767)       e <= err_t'(32767);
        else if (rounded < -34'sd32768) e <= err_t'(-32768);
        else                            e <= err_t'(rounded);
      end
    end
  end

endmodule
