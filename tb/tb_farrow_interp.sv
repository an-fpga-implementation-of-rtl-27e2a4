// tb_farrow_interp: feeds random samples with random mu and compares each
// interpolant with the piecewise-parabolic filter written in its direct form,
//   y = sum_{i=-2..1} h(i) x(m-i),  h(-2) = a mu^2 - a mu,
//   h(-1) = -a mu^2 + (1+a) mu,  h(0) = -a mu^2 - (1-a) mu + 1,
//   h(1) = a mu^2 - a mu,  a = 1/2,
// where x(m) is the third-newest sample. Latency must be three cycles.
// Also checks the end points: mu = 0 returns x(m) exactly.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_farrow_interp;
  import apsk_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  cplx_t in_r = '0, out_r;
  logic [15:0] mu = '0;
  always #5 clk = ~clk;
  farrow_interp dut (.*);
  int checks = 0, failures = 0;
  real xi [$], xq [$];

  function automatic real rabs(real x);
    return x < 0.0 ? -x : x;
  endfunction

  function automatic real interp(real q [$], real m);
    real a, xm2, xm1, x0, xp1;
    int n;
    a = 0.5;
    n = q.size();
    xm2 = q[n-1]; xm1 = q[n-2]; x0 = q[n-3]; xp1 = q[n-4];   // x(m+2) .. x(m-1)
    return (a*m*m - a*m) * xm2 + (-a*m*m + (1.0+a)*m) * xm1
         + (-a*m*m - (1.0-a)*m + 1.0) * x0 + (a*m*m - a*m) * xp1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 300; k++) begin
      sample_t si, sq;
      real ei, eq, m;
      si = sample_t'($urandom_range(0, 30000)) - 16'sd15000;
      sq = sample_t'($urandom_range(0, 30000)) - 16'sd15000;
      xi.push_back(real'(si)); xq.push_back(real'(sq));
      in_valid <= 1; in_r <= '{si, sq};
      mu <= (k % 7 == 0) ? 16'h0000 : 16'($urandom_range(0, 65535));
      @(posedge clk);
      in_valid <= 0;
      @(posedge clk); @(posedge clk);
      #1;
      if (k >= 3) begin
        m  = real'(mu) / 65536.0;
        ei = interp(xi, m); eq = interp(xq, m);
        checks++;
        if (!out_valid || rabs(ei - real'(out_r.i)) > 3.0 || rabs(eq - real'(out_r.q)) > 3.0
            || (mu == 0 && (real'(out_r.i) != xi[xi.size()-3]))) begin
          failures++;
          $display("FAIL k=%0d mu=%0d valid=%b got %0d,%0d expected %0.1f,%0.1f", k, mu, out_valid,
                   out_r.i, out_r.q, ei, eq);
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL: out_valid longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
