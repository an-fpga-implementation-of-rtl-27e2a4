// tb_apsk_decision: random received points (many near constellation points,
// some anywhere). The reference builds the sixteen 4+12-APSK points from the
// ring radii and angles in floating point, finds the nearest one by Euclidean
// distance, and maps it to its label (outer 15/45/75 degrees = 01/00/10,
// inner ring = 11, then the signs of I and Q). Points that lie within one LSB
// of a decision boundary are not counted. Latency must be one cycle and a_hat
// must be the chosen point.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_apsk_decision;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1, en = 0, out_valid;
  cplx_t in_r = '0, a_hat;
  sym_bits_t bits;
  always #5 clk = ~clk;
  apsk_decision dut (.*);
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
      real x, y, d, best_d, second_d;
      int best;
      if (k % 2 == 0) begin
        int b = $urandom_range(0, 15);
        x = pi_[b] + (real'($urandom_range(0, 4000)) - 2000.0) / 8192.0;
        y = pq_[b] + (real'($urandom_range(0, 4000)) - 2000.0) / 8192.0;
      end else begin
        x = (real'($urandom_range(0, 24000)) - 12000.0) / 8192.0;
        y = (real'($urandom_range(0, 24000)) - 12000.0) / 8192.0;
      end
      in_r.i <= sample_t'($rtoi(x * 8192.0));
      in_r.q <= sample_t'($rtoi(y * 8192.0));
      en <= 1;
      @(posedge clk);
      en <= 0;
      #1;
      x = real'(in_r.i) / 8192.0; y = real'(in_r.q) / 8192.0;
      best_d = 1e9; second_d = 1e9; best = 0;
      for (int b = 0; b < 16; b++) begin
        d = $sqrt((x - pi_[b]) ** 2 + (y - pq_[b]) ** 2);
        if (d < best_d) begin second_d = best_d; best_d = d; best = b; end
        else if (d < second_d) second_d = d;
      end
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: no out_valid one cycle after en"); end
      else if (second_d - best_d > 2.0 / 8192.0) begin
        real ai, aq;
        ai = real'(a_hat.i) / 8192.0; aq = real'(a_hat.q) / 8192.0;
        if (bits != sym_bits_t'(best) || (ai - pi_[best]) ** 2 + (aq - pq_[best]) ** 2 > 1e-7) begin
          failures++;
          $display("FAIL: (%0d,%0d) got %b expected %b", in_r.i, in_r.q, bits, sym_bits_t'(best));
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
