// matched_filter: receive SRRC matched filter with decimation to two samples
// per symbol.
//
// The transmitter uses a 513-tap square-root raised-cosine pulse (rolloff
// 0.4051, 16-symbol span at N = 32 samples per symbol, Kaiser window with
// shape factor 2.8299, amplitude 1/sqrt(N) as in the discrete SRRC formula).
// The receiver keeps only the 257 centre taps and scales them by 1/Z, the
// inverse of the CORDIC gain Z = prod_{i=1..11} sqrt(1 + 2^-2i) = 1.16444, so
// the rotator that follows needs no gain correction. The coefficient table,
// round(2^15 * p(n) / Z) for n = -128..128, is read from rtl/mf_coeffs.hex
// (Q1.15, 257 lines). Tap count, truncation and 1/Z scaling follow the
// thesis; the Q1.15 coefficient format is this design's choice.
//
// I and Q each have a NTAPS-long delay line that shifts on every valid input.
// Only every DECIM-th input (DECIM = N/2 = 16) produces an output, so the
// filter is evaluated only then: the full dot product of both rails is formed
// in one clock and registered (one cycle latency after the input that
// completes the block of DECIM). The decimation phase is arbitrary; the
// timing loop downstream absorbs it. Results are rounded back to Q2.13 and
// saturated.
module matched_filter
  import apsk_pkg::*;
#(
  parameter int    NTAPS      = 257,
  parameter int    DECIM      = 16,
  parameter string COEFF_FILE = "rtl/mf_coeffs.hex"
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_bb,
  output logic  out_valid,
  output cplx_t out_mf
);

  localparam int CF = 15;                 // coefficient fraction bits
  localparam int AW = 16 + 16 + $clog2(NTAPS) + 1;

  logic signed [15:0] coef [NTAPS];
  sample_t            dl_i [NTAPS];
  sample_t            dl_q [NTAPS];
  logic [$clog2(DECIM)-1:0] phase;

  initial $readmemh(COEFF_FILE, coef);

  function automatic sample_t round_sat(logic signed [AW-1:0] acc);
    logic signed [AW-1:0] r;
    r = (acc + (AW'(1) <<< (CF - 1))) >>> CF;
    if (r > AW'(32767))       return sample_t'(32767);
    else if (r < -AW'(32768)) return sample_t'(-32768);
    else                      return sample_t'(r);
  endfunction

  // dot product of the coefficient table with a delay line whose element 0
  // is the newest sample (the symmetric taps make the order immaterial)
  function automatic logic signed [AW-1:0] dot(input sample_t d [NTAPS],
                                               input sample_t newest);
    logic signed [AW-1:0] acc;
    acc = AW'(coef[0]) * AW'(newest);
    for (int k = 1; k < NTAPS; k++)
      acc += AW'(coef[k]) * AW'(d[k-1]);
    return acc;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_mf    <= '0;
      for (int k = 0; k < NTAPS; k++) begin
        dl_i[k] <= '0;
        dl_q[k] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        dl_i[0] <= in_bb.i;
        dl_q[0] <= in_bb.q;
        for (int k = 1; k < NTAPS; k++) begin
          dl_i[k] <= dl_i[k-1];
          dl_q[k] <= dl_q[k-1];
        end
        phase <= (phase == $clog2(DECIM)'(DECIM - 1)) ? '0 : phase + 1'b1;
        if (phase == $clog2(DECIM)'(DECIM - 1)) begin
          out_valid <= 1'b1;
          out_mf.i  <= round_sat(dot(dl_i, in_bb.i));
          out_mf.q  <= round_sat(dot(dl_q, in_bb.q));
        end
      end
    end
  end

endmodule
