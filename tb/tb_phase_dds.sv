// tb_phase_dds: the accumulator theta(n+1) = theta(n) + v(n) (+ m*pi/6 when a
// marker correction arrives), kept in (-pi, pi], is modelled in floating
// point, one update at a time. Checks one-cycle latency, each update within
// 4 LSB of Q3.28 (the 2pi and pi/6 constants are rounded), the
// Q3.12 copy, and that `wrapped` pulses exactly on the updates that crossed
// +-pi (which must happen in both directions).
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_phase_dds;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1, v_valid = 0, asm_found = 0, theta_valid, wrapped;
  loop_t v = '0, theta;
  logic [3:0] asm_idx = '0;
  angle_t theta_q12;
  always #5 clk = ~clk;
  phase_dds dut (.*);
  int checks = 0, failures = 0, n_wrap_up = 0, n_wrap_dn = 0, n_corr = 0;

  initial begin
    real th, nx, ex;
    logic exp_wrap;
    th = 0.0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 3000; k++) begin
      logic vv, af;
      vv = ($urandom_range(0, 5) != 0);
      af = ($urandom_range(0, 30) == 0);
      v_valid   <= vv;
      asm_found <= af;
      asm_idx   <= 4'($urandom_range(0, 11));
      v <= loop_t'($urandom_range(0, 100000000)) + ((k / 500) % 2 == 0 ? -32'sd20000000 : -32'sd80000000);
      @(posedge clk);
      v_valid <= 0; asm_found <= 0;
      #1;
      nx = th;
      if (vv) nx += real'(v) / 268435456.0;
      if (af) begin nx += asm_idx * PI / 6.0; n_corr++; end
      exp_wrap = 0;
      if (nx > PI) begin nx -= 2.0 * PI; exp_wrap = 1; n_wrap_up++; end
      else if (nx < -PI) begin nx += 2.0 * PI; exp_wrap = 1; n_wrap_dn++; end
      if (vv || af) th = nx;
      ex = th * 268435456.0;
      checks++;
      if (theta_valid != (vv || af) || (theta_valid && wrapped != exp_wrap)
          || real'(theta) - ex > 4.0 || ex - real'(theta) > 4.0
          || theta_q12 != angle_t'(theta >>> 16)) begin
        failures++;
        $display("FAIL: k=%0d theta %0d expected %0.1f wrapped %b/%b", k, theta, ex, wrapped, exp_wrap);
      end
      th = real'(theta) / 268435456.0;   // step-by-step comparison
    end
    checks++;
    if (n_wrap_up == 0 || n_wrap_dn == 0 || n_corr == 0) begin failures++; $display("FAIL: wrap or correction not exercised"); end
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
