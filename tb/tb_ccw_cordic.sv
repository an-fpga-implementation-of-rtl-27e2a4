// tb_ccw_cordic: random vectors and angles over [-pi, pi] (plus the end
// points), one per cycle. Each output must arrive exactly 12 cycles after its
// input and equal the exact counter-clockwise rotation times the CORDIC gain
// Z = prod_{i=1..11} sqrt(1+2^-2i), within 0.15 % of full scale.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_ccw_cordic;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  cplx_t in_r = '0, out_r;
  angle_t in_theta = '0;
  always #5 clk = ~clk;
  ccw_cordic dut (.*);
  int checks = 0, failures = 0, cyc = 0;
  real z;
  real exp_i [$], exp_q [$];
  int  exp_t [$];

  function automatic real rabs(real x);
    return x < 0.0 ? -x : x;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid) begin
      real ei, eq;
      int  t;
      checks++;
      if (exp_i.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        ei = exp_i.pop_front(); eq = exp_q.pop_front(); t = exp_t.pop_front();
        if (cyc - t != 12 || rabs(ei - real'(out_r.i)) > 48.0 || rabs(eq - real'(out_r.q)) > 48.0) begin
          failures++;
          $display("FAIL: latency %0d got %0d,%0d expected %0.1f,%0.1f", cyc - t, out_r.i, out_r.q, ei, eq);
        end
      end
    end
    if (!rst && in_valid) begin
      real th;
      th = real'(in_theta) / 4096.0;
      exp_i.push_back(z * (real'(in_r.i) * $cos(th) - real'(in_r.q) * $sin(th)));
      exp_q.push_back(z * (real'(in_r.i) * $sin(th) + real'(in_r.q) * $cos(th)));
      exp_t.push_back(cyc);
    end
  end

  initial begin
    z = 1.0;
    for (int i = 1; i <= 11; i++) z *= $sqrt(1.0 + 2.0 ** (-2 * i));
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 600; k++) begin
      in_valid <= ($urandom_range(0, 4) != 0);
      in_r.i   <= sample_t'($urandom_range(0, 24000)) - 16'sd12000;
      in_r.q   <= sample_t'($urandom_range(0, 24000)) - 16'sd12000;
      if (k == 0)      in_theta <= PI_Q12;
      else if (k == 1) in_theta <= -PI_Q12;
      else             in_theta <= angle_t'($urandom_range(0, 2 * 12868)) - PI_Q12;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (exp_i.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_i.size()); end
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
