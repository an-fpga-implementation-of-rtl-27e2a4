// tb_zc_ted: drives the detector the way the loop does: a mid-symbol sample
// (smp_valid with strobe low), which must give a zero-valued update one cycle
// later, then a decision (dec_valid with its label and point), which must give
//   e = Re{ x_mid * conj(a_prev - a_now) }  in Q4.11
// one cycle later, where a_prev is the previous decision. The reference takes
// the points from the ring geometry in floating point.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_zc_ted;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1, smp_valid = 0, strobe = 0, dec_valid = 0, out_valid;
  cplx_t smp = '0, a_hat = '0;
  sym_bits_t bits = '0;
  err_t e;
  always #5 clk = ~clk;
  zc_ted dut (.*);
  int checks = 0, failures = 0;
  real pi_ [16], pq_ [16];

  initial begin
    real r2, r1;
    r2 = $sqrt(16.0 / (12.0 + 4.0 / (2.75 * 2.75)));
    r1 = r2 / 2.75;
    for (int b = 0; b < 16; b++) begin
      real ang, rad;
      case (b >> 2)
        1: begin ang = 15.0; rad = r2; end
        0: begin ang = 45.0; rad = r2; end
        2: begin ang = 75.0; rad = r2; end
        default: begin ang = 45.0; rad = r1; end
      endcase
      pi_[b] = rad * $cos(ang * PI / 180.0) * (b[1] ? -1.0 : 1.0);
      pq_[b] = rad * $sin(ang * PI / 180.0) * (b[0] ? -1.0 : 1.0);
    end
  end

  initial begin
    real prev_i, prev_q;
    prev_i = 0.0; prev_q = 0.0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 1000; k++) begin
      real mi, mq, ex;
      int b;
      // mid-symbol sample
      smp.i <= sample_t'($urandom_range(0, 20000)) - 16'sd10000;
      smp.q <= sample_t'($urandom_range(0, 20000)) - 16'sd10000;
      smp_valid <= 1; strobe <= 0;
      @(posedge clk);
      smp_valid <= 0;
      #1;
      mi = real'(smp.i) / 8192.0; mq = real'(smp.q) / 8192.0;
      checks++;
      if (!out_valid || e != 0) begin failures++; $display("FAIL: mid-sample update %0d valid %b", e, out_valid); end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      // decision at the symbol-time sample
      b = $urandom_range(0, 15);
      bits <= sym_bits_t'(b);
      a_hat.i <= sample_t'($rtoi(pi_[b] * 8192.0 + (pi_[b] >= 0 ? 0.5 : -0.5)));
      a_hat.q <= sample_t'($rtoi(pq_[b] * 8192.0 + (pq_[b] >= 0 ? 0.5 : -0.5)));
      smp_valid <= 1; strobe <= 1; dec_valid <= 0;
      @(posedge clk);
      smp_valid <= 0; strobe <= 0; dec_valid <= 1;
      #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL: update on a strobe sample"); end
      @(posedge clk);
      dec_valid <= 0;
      #1;
      ex = (mi * (prev_i - pi_[b]) + mq * (prev_q - pq_[b])) * 2048.0;
      checks++;
      if (!out_valid || real'(e) - ex > 2.0 || ex - real'(e) > 2.0) begin
        failures++;
        $display("FAIL: k=%0d got %0d expected %0.2f valid %b", k, e, ex, out_valid);
      end
      prev_i = pi_[b]; prev_q = pq_[b];
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
