// tb_ml_ped: random received samples and decisions. The expected error is
// Im{y * conj(a)} = y_q a_i - y_i a_q, rounded to Q2.13, computed in floating
// point; the output must match within one LSB, one cycle after en, and hold
// while en is low.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_ml_ped;
  import apsk_pkg::*;
  logic clk = 0, rst = 1, en = 0, out_valid;
  cplx_t in_r = '0, a_hat = '0;
  err_t e;
  always #5 clk = ~clk;
  ml_ped dut (.*);
  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 1000; k++) begin
      real ex;
      err_t held;
      in_r.i  <= sample_t'($urandom_range(0, 24000)) - 16'sd12000;
      in_r.q  <= sample_t'($urandom_range(0, 24000)) - 16'sd12000;
      a_hat.i <= sample_t'($urandom_range(0, 18000)) - 16'sd9000;
      a_hat.q <= sample_t'($urandom_range(0, 18000)) - 16'sd9000;
      en <= 1;
      @(posedge clk);
      en <= 0;
      #1;
      ex = (real'(in_r.q) * real'(a_hat.i) - real'(in_r.i) * real'(a_hat.q)) / 8192.0;
      if (ex > 32767.0) ex = 32767.0;
      if (ex < -32768.0) ex = -32768.0;
      checks++;
      if (!out_valid || real'(e) - ex > 1.0 || ex - real'(e) > 1.0) begin
        failures++;
        $display("FAIL: got %0d expected %0.2f valid %b", e, ex, out_valid);
      end
      held = e;
      in_r.i <= in_r.i + 16'sd100;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid || e != held) begin failures++; $display("FAIL: output changed without en"); end
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
