// filter_and_counter: back end of the symbol-timing loop, the timing loop
// filter followed by the modulo-1 counter (interpolation control).
//
// Every interpolant yields one timing error (zero unless it was a symbol-time
// interpolant); the error is filtered with the timing-loop constants
// (K1 = -9.950e-4, K2 = -1.327e-6, which already contain Kp = 2.68 and the
// counter's negative sensitivity K0 = -1, as in the thesis's table) and the
// result v drives the counter. The counter sees v as in
// eta(n+1) = (eta(n) - (v(n) + 1/2)) mod 1, so no separate K0 multiplier is
// used.
//
// Interface: e_valid/e (Q4.11) in; two cycles later ctl_valid with the
// strobe for the next interpolant and mu. v is brought out for monitoring.
module filter_and_counter
  import apsk_pkg::*;
#(
  parameter logic signed [31:0] K1K2 = -32'sd2139596,   // round((K1+K2)*2^31)
  parameter logic signed [31:0] K2   = -32'sd2850       // round(K2*2^31)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        e_valid,
  input  err_t        e,
  output logic        ctl_valid,
  output logic        strobe,
  output logic [15:0] mu,
  output loop_t       v
);

  logic v_valid;

  ppi_loop_filter #(.K1K2(K1K2), .K2(K2), .E_FRAC(11), .V_FRAC(30)) u_filter (
    .clk, .rst,
    .in_valid (e_valid),
    .e,
    .out_valid(v_valid),
    .v
  );

  interp_control u_counter (
    .clk, .rst,
    .in_valid (v_valid),
    .v,
    .out_valid(ctl_valid),
    .strobe,
    .mu
  );

endmodule
