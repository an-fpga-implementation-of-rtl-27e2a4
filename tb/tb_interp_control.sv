// tb_interp_control: the modulo-1 down-counter eta(n+1) = (eta(n) - W(n))
// mod 1, W = 1/2 + v, modelled in floating point. A strobe is expected on
// each underflow, with mu = eta(m)/W ~= 2 eta(m) (Q0.16, truncated, saturated
// below 1). Random control words cover nominal counting (a strobe every second
// sample), long and short intervals, and the mu saturation case.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_interp_control;
  import apsk_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid, strobe;
  loop_t v = '0;
  logic [15:0] mu;
  always #5 clk = ~clk;
  interp_control dut (.*);
  int checks = 0, failures = 0, n_strobe = 0, n_sat = 0;

  initial begin
    real eta, nx, vr, exp_mu;
    logic exp_strobe;
    logic [15:0] last_mu;
    eta = 0.5; last_mu = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 4000; k++) begin
      case ($urandom_range(0, 3))
        0: v <= '0;
        1: v <= loop_t'($urandom_range(0, 2000000)) - 32'sd1000000;
        2: v <= loop_t'($urandom_range(0, 200000000)) - 32'sd100000000;
        default: v <= loop_t'($urandom_range(0, 536870912)) - 32'sd268435456;  // |v| < 1/4
      endcase
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      vr = real'(v) / 1073741824.0;
      nx = eta - 0.5 - vr;
      exp_strobe = nx < 0.0;
      if (exp_strobe) begin
        exp_mu = $floor(2.0 * eta * 65536.0);
        if (exp_mu > 65535.0) begin exp_mu = 65535.0; n_sat++; end
        nx += 1.0;
        n_strobe++;
      end else begin
        exp_mu = real'(last_mu);
      end
      eta = nx;
      checks++;
      if (!out_valid || strobe != exp_strobe || real'(mu) != exp_mu) begin
        failures++;
        $display("FAIL: k=%0d strobe %b/%b mu %0d/%0.0f", k, strobe, exp_strobe, mu, exp_mu);
        eta = real'(dut.eta) / 1073741824.0;
      end
      last_mu = mu;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL: out_valid without input"); end
    end
    checks++;
    if (n_strobe == 0 || n_sat == 0) begin failures++; $display("FAIL: strobe or saturation never seen"); end
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
