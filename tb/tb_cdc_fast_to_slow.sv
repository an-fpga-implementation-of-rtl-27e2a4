// tb_cdc_fast_to_slow: 400 MHz and 125 MHz clocks with a drifting phase
// relation; single-cycle fast pulses at random spacings of at least eight
// fast cycles. Each must produce exactly one slow pulse, no later than four
// slow cycles after it; no slow pulse may appear without a fast one.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_cdc_fast_to_slow;
  logic clk_fast = 0, clk_slow = 0, rst_fast = 1, rst_slow = 1;
  logic pulse_fast = 0, pulse_slow;
  always #1.25ns clk_fast = ~clk_fast;
  always #4.01ns clk_slow = ~clk_slow;
  cdc_fast_to_slow dut (.*);
  int checks = 0, failures = 0, sent = 0, got = 0;
  realtime t_sent [$];

  always @(posedge clk_slow) begin
    if (!rst_slow && pulse_slow) begin
      checks++;
      got++;
      if (t_sent.size() == 0) begin
        failures++; $display("FAIL: slow pulse without a fast one");
      end else begin
        realtime t;
        t = t_sent.pop_front();
        if ($realtime - t > 4 * 8.02ns) begin
          failures++; $display("FAIL: pulse took %0t", $realtime - t);
        end
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk_slow);
    rst_slow <= 0;
    @(posedge clk_fast);
    rst_fast <= 0;
    repeat (10) @(posedge clk_fast);
    for (int k = 0; k < 2000; k++) begin
      pulse_fast <= 1;
      @(posedge clk_fast);
      t_sent.push_back($realtime);
      pulse_fast <= 0;
      sent++;
      repeat ($urandom_range(7, 40)) @(posedge clk_fast);
    end
    repeat (20) @(posedge clk_fast);
    checks++;
    if (got != sent) begin failures++; $display("FAIL: %0d pulses sent, %0d received", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
