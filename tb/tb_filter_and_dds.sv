// tb_filter_and_dds: the phase loop's filter and accumulator with their
// timing. A phase error (ped_valid) is held until the next `start` (the
// arrival of the following sample from the slow domain); the filter runs then
// and theta is updated two cycles after that start. A start with no error
// pending must not update theta. A marker correction (asm_found with index m)
// is added as m*pi/6 together with the next update. The reference is a
// floating-point model of the filter and accumulator.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_filter_and_dds;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real K1K2 = 5734975.0 / 2147483648.0;
  localparam real K2   = 7636.0 / 2147483648.0;
  logic clk = 0, rst = 1, ped_valid = 0, start = 0, asm_found = 0;
  err_t e = '0;
  logic [3:0] asm_idx = '0;
  logic theta_valid, wrapped;
  loop_t theta;
  angle_t theta_q12;
  always #5 clk = ~clk;
  filter_and_dds dut (.*);
  int checks = 0, failures = 0, n_corr = 0, n_wrap = 0;

  task automatic idle_check(int n);
    repeat (n) begin
      @(posedge clk);
      #1;
      checks++;
      if (theta_valid) begin failures++; $display("FAIL: theta updated without a pending error"); end
    end
  endtask

  initial begin
    real acc, th, ee, ex;
    int corr;
    acc = 0.0; th = 0.0; corr = -1;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 1500; k++) begin
      // error from the phase detector
      e <= err_t'($urandom_range(0, 16000)) - 16'sd2000;
      ped_valid <= 1;
      @(posedge clk);
      ped_valid <= 0;
      if ($urandom_range(0, 20) == 0) begin
        corr = $urandom_range(0, 11);
        asm_idx <= 4'(corr); asm_found <= 1;
        @(posedge clk);
        asm_found <= 0;
      end
      idle_check($urandom_range(1, 4));
      // next sample arrives: filter runs
      start <= 1;
      @(posedge clk);
      start <= 0;
      #1;
      checks++;
      if (theta_valid) begin failures++; $display("FAIL: update one cycle after start"); end
      ee = real'(e) / 8192.0;
      ex = th + K1K2 * ee + K2 * acc;
      acc += ee;
      if (corr >= 0) begin ex += corr * PI / 6.0; n_corr++; corr = -1; end
      if (ex > PI) ex -= 2.0 * PI;
      if (ex < -PI) ex += 2.0 * PI;
      @(posedge clk);
      #1;
      checks++;
      if (wrapped) n_wrap++;
      if (!theta_valid || (real'(theta) / 268435456.0 - ex) ** 2 > 1e-14) begin
        failures++;
        $display("FAIL: k=%0d theta %0.6f expected %0.6f valid %b", k, real'(theta) / 268435456.0, ex, theta_valid);
      end
      th = real'(theta) / 268435456.0;
      // a second start with nothing pending
      start <= 1;
      @(posedge clk);
      start <= 0;
      idle_check(3);
    end
    checks++;
    if (n_corr == 0 || n_wrap == 0) begin failures++; $display("FAIL: correction or wrap not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
