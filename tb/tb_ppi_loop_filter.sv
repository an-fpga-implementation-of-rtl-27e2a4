// tb_ppi_loop_filter: the proportional-plus-integral filter
//   v[n] = (K1+K2) e[n] + K2 * sum_{k<n} e[k]
// is checked against a floating-point model with the phase-loop constants
// (K in Q0.31, e in Q2.13, v in Q3.28). Random errors arrive on random
// cycles; each output must come one cycle after its input, within one LSB of
// the model, and v must hold between inputs.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_ppi_loop_filter;
  import apsk_pkg::*;
  localparam logic signed [31:0] K1K2 = 32'sd5734975;
  localparam logic signed [31:0] K2   = 32'sd7636;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  err_t e = '0;
  loop_t v;
  always #5 clk = ~clk;
  ppi_loop_filter dut (.*);
  int checks = 0, failures = 0;

  initial begin
    real acc, ex, ee;
    acc = 0.0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 2000; k++) begin
      loop_t held;
      // mostly one sign so the integrator grows far from zero
      e <= err_t'($urandom_range(0, 8000)) - ((k < 1000) ? 16'sd2000 : 16'sd6000);
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      ee = real'(e) / 8192.0;
      ex = (real'(K1K2) / 2147483648.0 * ee + real'(K2) / 2147483648.0 * acc) * 268435456.0;
      acc += ee;
      checks++;
      if (!out_valid || real'(v) - ex > 1.0 || ex - real'(v) > 1.0) begin
        failures++;
        $display("FAIL: k=%0d got %0d expected %0.2f", k, v, ex);
      end
      held = v;
      repeat ($urandom_range(1, 3)) begin
        @(posedge clk);
        #1;
        checks++;
        if (out_valid || v != held) begin failures++; $display("FAIL: output changed without input"); end
      end
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
