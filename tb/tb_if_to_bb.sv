// tb_if_to_bb: drives random IF samples (with gaps in in_valid) and checks
// that the output follows the pattern I,Q = (s,0), (0,-s), (-s,0), (0,s)
// over consecutive valid samples, with one cycle of latency.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_if_to_bb;
  import apsk_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  sample_t in_sample = '0;
  cplx_t out_bb;
  always #5 clk = ~clk;
  if_to_bb dut (.*);
  int checks = 0, failures = 0, n = 0;
  sample_t last;
  logic    pend = 0;

  always @(posedge clk) begin
    if (!rst && pend) begin
      int exp_i, exp_q, s;
      s = int'(last);
      if (s == -32768) s = -32767;   // the mixer saturates -(-32768)
      case (n % 4)
        0: begin exp_i = int'(last);  exp_q = 0;  end
        1: begin exp_i = 0;  exp_q = -s; end
        2: begin exp_i = -s; exp_q = 0;  end
        default: begin exp_i = 0; exp_q = int'(last); end
      endcase
      checks++;
      if (!out_valid || int'(out_bb.i) != exp_i || int'(out_bb.q) != exp_q) begin
        failures++;
        $display("FAIL n=%0d s=%0d got v=%b %0d,%0d", n, s, out_valid, out_bb.i, out_bb.q);
      end
      n++;
    end
    if (!rst && !pend && out_valid) begin
      checks++; failures++; $display("FAIL unexpected out_valid");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (400) begin
      @(posedge clk);
      if ($urandom_range(0, 3) != 0) begin
        in_valid  <= 1;
        in_sample <= sample_t'($urandom_range(0, 65535) - 32768 + 1);
      end else in_valid <= 0;
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // the sample seen by the DUT on this edge is the one checked next edge
  always @(posedge clk) begin
    pend <= in_valid;
    if (in_valid) last <= in_sample;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
