// ppi_loop_filter: proportional-plus-integrator loop filter,
//   H(z) = K1 + K2 / (1 - z^-1).
//
// The output K1*e(k) + K2*e(k) + sum_{i<k} K2*e(i) is computed as
// (K1+K2)*e(k) + I(k-1) with I(k) = I(k-1) + K2*e(k), so only the constants
// K2 and K1+K2 are stored, both as 32-bit values with 31 fraction bits; that
// rearrangement and the 32-bit gains follow the thesis. The integrator
// keeps the full product precision (E_FRAC+31 fraction bits); the output is
// truncated to 32 bits with V_FRAC fraction bits.
//
// Interface: in_valid/e in; out_valid/v one cycle later. Default constants are
// the carrier loop's (K1 = 2.667e-3, K2 = 3.556e-6): K1K2 = round((K1+K2)*2^31),
// K2 = round(K2*2^31).
module ppi_loop_filter
  import apsk_pkg::*;
#(
  parameter logic signed [31:0] K1K2   = 32'sd5734975,
  parameter logic signed [31:0] K2     = 32'sd7636,
  parameter int                 E_FRAC = 13,
  parameter int                 V_FRAC = 28
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  err_t  e,
  output logic  out_valid,
  output loop_t v
);

  localparam int PW    = 56;                       // product / integrator width
  localparam int SHIFT = E_FRAC + 31 - V_FRAC;

  logic signed [PW-1:0] integ, prop, intg_step, sum;

  assign prop      = PW'(e) * PW'(K1K2);
  assign intg_step = PW'(e) * PW'(K2);
  assign sum       = (prop + integ) >>> SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      integ     <= '0;
      out_valid <= 1'b0;
      v         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        integ <= integ + intg_step;
        v     <= loop_t'(sum);
      end
    end
  end

endmodule
