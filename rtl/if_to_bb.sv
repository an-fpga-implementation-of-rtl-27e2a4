// if_to_bb: IF-to-complex-baseband mixer for a signal sampled at four times
// its IF (digital center frequency pi/2).
//
// Because exp(-j*pi/2*n) only takes the values 1, -j, -1, j, the mixer needs
// no multiplier: a two-bit counter steps through the pattern on every valid
// ADC sample and routes the sample, or its negation, to I or to Q while the
// other rail gets zero:
//   count 0: I = +s, Q = 0      count 1: I = 0, Q = -s
//   count 2: I = -s, Q = 0      count 3: I = 0, Q = +s
// The routing by counter follows the thesis; the signs come from the mixer
// term exp(-j*pi/2*n). Negating -32768 saturates to +32767. The image left at
// pi is removed by the matched filter that follows.
//
// Interface: one sample per cycle with in_valid high; the output is
// registered, one cycle of latency, with out_valid.
module if_to_bb
  import apsk_pkg::*;
(
  input  logic    clk,
  input  logic    rst,        // synchronous, active high
  input  logic    in_valid,
  input  sample_t in_sample,  // real IF sample, Q2.13
  output logic    out_valid,
  output cplx_t   out_bb      // baseband sample (I, Q)
);

  logic [1:0] count;
  sample_t    neg;

  assign neg = (in_sample == sample_t'(-32768)) ? sample_t'(32767) : -in_sample;

  always_ff @(posedge clk) begin
    if (rst) begin
      count     <= '0;
      out_valid <= 1'b0;
      out_bb    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        count <= count + 2'd1;
        unique case (count)
          2'd0: begin out_bb.i <= in_sample; out_bb.q <= '0;        end
          2'd1: begin out_bb.i <= '0;        out_bb.q <= neg;       end
          2'd2: begin out_bb.i <= neg;       out_bb.q <= '0;        end
          default: begin out_bb.i <= '0;     out_bb.q <= in_sample; end
        endcase
      end
    end
  end

endmodule
