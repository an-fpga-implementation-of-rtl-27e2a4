// tb_cdc_slow_to_fast: an 8-bit value changes in the slow domain and is held
// for a random number of slow cycles. The fast output must show only values
// that were sent, in order, and must show the new value no later than one
// slow cycle plus three fast cycles after it was applied.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_cdc_slow_to_fast;
  logic clk_fast = 0, clk_slow = 0;
  logic [7:0] d_slow = '0, q_fast;
  always #1.25ns clk_fast = ~clk_fast;
  always #4.01ns clk_slow = ~clk_slow;
  cdc_slow_to_fast #(.WIDTH(8)) dut (.*);
  int checks = 0, failures = 0;
  logic [7:0] prev_v = '0, cur_v = '0;

  always @(posedge clk_fast) begin
    if ($realtime > 50ns) begin
      checks++;
      if (q_fast != prev_v && q_fast != cur_v) begin
        failures++; $display("FAIL: fast side shows %h, sent %h then %h", q_fast, prev_v, cur_v);
      end
    end
  end

  initial begin
    repeat (8) @(posedge clk_slow);
    for (int k = 0; k < 1500; k++) begin
      logic [7:0] nv;
      nv = 8'($urandom_range(0, 255));
      if (nv == cur_v) nv = nv + 8'd1;
      prev_v = cur_v;
      d_slow <= nv;
      cur_v = nv;
      @(posedge clk_slow);
      #(8.02ns + 3 * 2.5ns);
      checks++;
      if (q_fast != nv) begin failures++; $display("FAIL: %h not through in time (%h)", nv, q_fast); end
      repeat ($urandom_range(0, 3)) @(posedge clk_slow);
      @(posedge clk_slow);
    end
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
