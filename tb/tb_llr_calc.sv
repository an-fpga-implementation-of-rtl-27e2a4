// tb_llr_calc: random received samples; for each bit the reference computes
//   max over points with bit = 1 of (2<r,a> - |a|^2)
//   - max over points with bit = 0 of the same
// in floating point with the constellation built from the ring geometry, and
// compares with the Q4.11 outputs (within 2 LSB), one cycle after en. Signs
// are checked on the constellation points themselves: a transmitted point
// must give LLRs whose signs are its own label.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_llr_calc;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1, en = 0, out_valid;
  cplx_t in_r = '0;
  llr_t llr [4];
  always #5 clk = ~clk;
  llr_calc dut (.*);
  int checks = 0, failures = 0;
  real pi_ [16], pq_ [16];

  initial begin
    real r2, r1;
    r2 = $sqrt(16.0 / (12.0 + 4.0 / (2.75 * 2.75)));
    r1 = r2 / 2.75;
    for (int b = 0; b < 16; b++) begin
      real ang, rad;
      case (b >> 2)
        1: begin ang = 15.0; rad = r2; end
        0: begin ang = 45.0; rad = r2; end
        2: begin ang = 75.0; rad = r2; end
        default: begin ang = 45.0; rad = r1; end
      endcase
      pi_[b] = rad * $cos(ang * PI / 180.0) * (b[1] ? -1.0 : 1.0);
      pq_[b] = rad * $sin(ang * PI / 180.0) * (b[0] ? -1.0 : 1.0);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 2000; k++) begin
      real x, y, ex, m1, m0, mt;
      int lab;
      lab = $urandom_range(0, 15);
      if (k % 2 == 0) begin
        x = pi_[lab] + (real'($urandom_range(0, 600)) - 300.0) / 8192.0;
        y = pq_[lab] + (real'($urandom_range(0, 600)) - 300.0) / 8192.0;
      end else begin
        x = (real'($urandom_range(0, 30000)) - 15000.0) / 8192.0;
        y = (real'($urandom_range(0, 30000)) - 15000.0) / 8192.0;
      end
      in_r.i <= sample_t'($rtoi(x * 8192.0));
      in_r.q <= sample_t'($rtoi(y * 8192.0));
      en <= 1;
      @(posedge clk);
      en <= 0;
      #1;
      x = real'(in_r.i) / 8192.0; y = real'(in_r.q) / 8192.0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: no out_valid"); end
      for (int bit_ = 0; bit_ < 4; bit_++) begin
        m1 = -1e9; m0 = -1e9;
        for (int b = 0; b < 16; b++) begin
          mt = 2.0 * (x * pi_[b] + y * pq_[b]) - pi_[b] ** 2 - pq_[b] ** 2;
          if ((b >> bit_) & 1) begin if (mt > m1) m1 = mt; end
          else                 begin if (mt > m0) m0 = mt; end
        end
        ex = (m1 - m0) * 2048.0;
        if (ex > 32767.0) ex = 32767.0;
        if (ex < -32768.0) ex = -32768.0;
        checks++;
        if (real'(llr[bit_]) - ex > 2.0 || ex - real'(llr[bit_]) > 2.0) begin
          failures++;
          $display("FAIL: (%0d,%0d) bit %0d got %0d expected %0.1f", in_r.i, in_r.q, bit_, llr[bit_], ex);
        end
        if (k % 2 == 0) begin
          checks++;
          if ((llr[bit_] > 0) != lab[bit_]) begin failures++; $display("FAIL: sign of bit %0d for label %0d", bit_, lab); end
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL: out_valid without en"); end
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
