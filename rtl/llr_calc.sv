// llr_calc: soft bit values (log-likelihood ratios) for the LDPC decoder.
//
// For each of the four bits of a symbol,
//   lambda_i = max_{a: b_i=1} (2<r,a> - |a|^2) - max_{a: b_i=0} (2<r,a> - |a|^2)
// over the 16 constellation points. This max-log form needs no noise
// variance (the decoder's scaled-min algorithm ignores a common scale) and no
// search for the nearest point per bit first; it is the thesis's formula,
// including its sign (positive favours a 1). The |a|^2 values are constants.
//
// Interface: en with the interpolated symbol-time sample r (Q2.13);
// out_valid one cycle later with llr[3] (MSB) .. llr[0] (LSB), Q4.11,
// saturated to 16 bits.
module llr_calc
  import apsk_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  cplx_t in_r,
  output logic  out_valid,
  output llr_t  llr [4]
);

  localparam int LF = 11;
  typedef logic signed [35:0] m_t;     // Q?.26 metrics

  m_t metric [16];

  always_comb begin
    for (int k = 0; k < 16; k++) begin
      cplx_t a;
      a = point_of(sym_bits_t'(k));
      metric[k] = ((m_t'(in_r.i) * m_t'(a.i) + m_t'(in_r.q) * m_t'(a.q)) <<< 1)
                - (m_t'(a.i) * m_t'(a.i) + m_t'(a.q) * m_t'(a.q));
    end
  end

  function automatic llr_t bit_llr(input m_t mt [16], int b);
    m_t best1, best0, d;
    best1 = '0; best0 = '0;
    for (int k = 0; k < 16; k++) begin
      if (k[b]) begin
        if (k == (1 << b) || mt[k] > best1) best1 = mt[k];
      end else begin
        if (k == 0 || mt[k] > best0) best0 = mt[k];
      end
    end
    d = (best1 - best0 + (m_t'(1) <<< (2*SF - LF - 1))) >>> (2*SF - LF);
    if (d > m_t'(32767))       return llr_t'(32767);
    else if (d < -m_t'(32768)) return llr_t'(-32768);
    else                       return llr_t'(d);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int b = 0; b < 4; b++) llr[b] <= '0;
    end else begin
      out_valid <= en;
      if (en)
        for (int b = 0; b < 4; b++) llr[b] <= bit_llr(metric, b);
    end
  end

endmodule
