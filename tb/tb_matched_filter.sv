// tb_matched_filter: random complex input at full rate; checks that exactly
// one output comes per 16 inputs and that each output equals the dot product
// of the last 257 inputs with the SRRC pulse (rolloff 0.4051, Kaiser window
// 2.8299, 1/sqrt(32) amplitude, centre 257 of 513 taps, divided by the CORDIC
// gain 1.16444), computed here in floating point. Tolerance 12 LSB covers
// the Q1.15 rounding of the 257 coefficients.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_matched_filter;
  import apsk_pkg::*;
  localparam int  NT = 257;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  cplx_t in_bb = '0, out_mf;
  always #5 clk = ~clk;
  matched_filter dut (.*);
  int checks = 0, failures = 0;
  real h [NT];
  real hist_i [$], hist_q [$];
  int  n_in = 0, n_out = 0;

  function automatic real rabs(real x);
    return x < 0.0 ? -x : x;
  endfunction

  function automatic real bessel_i0(real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 30; k++) begin
      t = t * (x / (2.0 * k)) * (x / (2.0 * k));
      s += t;
    end
    return s;
  endfunction

  initial begin
    real a, x, num, den, w, z;
    a = 0.4051;
    z = 1.0;
    for (int i = 1; i <= 11; i++) z *= $sqrt(1.0 + 2.0 ** (-2 * i));
    for (int k = 0; k < NT; k++) begin
      int n;
      n = k - 128;
      x = real'(n) / 32.0;
      if (n == 0) num = 1.0 - a + 4.0 * a / PI;
      else begin
        num = ($sin(PI * (1.0 - a) * x) + 4.0 * a * x * $cos(PI * (1.0 + a) * x))
              / (PI * x * (1.0 - (4.0 * a * x) ** 2));
      end
      w = bessel_i0(2.8299 * $sqrt(1.0 - (real'(n) / 256.0) ** 2)) / bessel_i0(2.8299);
      h[k] = num / $sqrt(32.0) * w / z;
    end
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      real ri, rq;
      ri = 0; rq = 0;
      for (int k = 0; k < NT; k++) begin
        ri += h[k] * hist_i[hist_i.size() - 1 - k];
        rq += h[k] * hist_q[hist_q.size() - 1 - k];
      end
      n_out++;
      checks++;
      if (rabs(ri - real'(out_mf.i)) > 12.0 || rabs(rq - real'(out_mf.q)) > 12.0) begin
        failures++;
        $display("FAIL out %0d: got %0d,%0d expected %0.1f,%0.1f", n_out, out_mf.i, out_mf.q, ri, rq);
      end
    end
    // record what the filter takes on this edge (after the check above)
    if (!rst && in_valid) begin
      hist_i.push_back(real'(in_bb.i));
      hist_q.push_back(real'(in_bb.q));
      n_in++;
    end
  end

  initial begin
    for (int k = 0; k < NT; k++) begin hist_i.push_back(0.0); hist_q.push_back(0.0); end
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (16 * 40) begin
      sample_t si, sq;
      si = sample_t'($urandom_range(0, 8191)) - 16'sd4096;
      sq = sample_t'($urandom_range(0, 8191)) - 16'sd4096;
      in_valid <= 1;
      in_bb    <= '{si, sq};
      @(posedge clk);
      if ($urandom_range(0, 2) == 0) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != n_in / 16) begin
      failures++;
      $display("FAIL: %0d outputs for %0d inputs", n_out, n_in);
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
