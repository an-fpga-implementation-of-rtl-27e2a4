// tb_filter_and_counter: the timing loop's filter and counter together.
// Random timing errors (Q4.11) arrive at random intervals. The reference is a
// floating-point model of the filter v = (K1+K2) e[n] + K2 sum e[k<n] (Q2.30,
// truncated) followed by the modulo-1 counter with W = 1/2 + v. Checks: the
// control word arrives two cycles after each error, with the model's strobe
// and mu; nothing arrives otherwise.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_filter_and_counter;
  import apsk_pkg::*;
  localparam real K1K2 = -2139596.0;
  localparam real K2   = -2850.0;
  logic clk = 0, rst = 1, e_valid = 0, ctl_valid, strobe;
  err_t e = '0;
  logic [15:0] mu;
  loop_t v;
  always #5 clk = ~clk;
  filter_and_counter dut (.*);
  int checks = 0, failures = 0, n_strobe = 0;

  initial begin
    real integ, vv, eta, nx, emu;
    logic es;
    logic [15:0] last_mu;
    integ = 0.0; eta = 536870912.0; last_mu = 0;   // eta in units of 2^-30
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 3000; k++) begin
      e <= err_t'($urandom_range(0, 6000)) - ((k / 300) % 2 == 0 ? 16'sd2500 : 16'sd3500);
      e_valid <= 1;
      @(posedge clk);
      e_valid <= 0;
      #1;
      checks++;
      if (ctl_valid) begin failures++; $display("FAIL: control word after one cycle"); end
      vv = $floor((real'(e) * K1K2 + integ) / 4096.0);
      integ += real'(e) * K2;
      nx = eta - 536870912.0 - vv;
      es = nx < 0.0;
      if (es) begin
        emu = $floor(eta / 8192.0);
        if (emu > 65535.0) emu = 65535.0;
        nx += 1073741824.0;
        n_strobe++;
      end else emu = real'(last_mu);
      eta = nx;
      @(posedge clk);
      #1;
      checks++;
      if (!ctl_valid || strobe != es || real'(mu) != emu || real'(v) != vv) begin
        failures++;
        $display("FAIL: k=%0d strobe %b/%b mu %0d/%0.0f v %0d/%0.0f", k, strobe, es, mu, emu, v, vv);
      end
      last_mu = mu;
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk);
        #1;
        checks++;
        if (ctl_valid) begin failures++; $display("FAIL: control word without an error input"); end
      end
    end
    checks++;
    if (n_strobe == 0) begin failures++; $display("FAIL: no strobe"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
