// tb_asm_detector: a stream of random decisions, one every 16 cycles, with
// the marker inserted several times, each time rotated by a random multiple m
// of 30 degrees and with a few random bit errors. The rotated marker is built
// here geometrically: every marker symbol's constellation point is turned by
// m*30 degrees and decided to the nearest point. Checks: found pulses exactly
// once per inserted marker, eleven cycles after its last symbol, with idx = m
// and min_dist equal to the number of inserted bit errors; no detection on
// random data.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_asm_detector;
  import apsk_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  GAP = 16;
  logic clk = 0, rst = 1, dec_valid = 0, found;
  sym_bits_t bits = '0;
  logic [3:0] idx;
  logic [8:0] min_dist;
  always #5 clk = ~clk;
  asm_detector dut (.*);
  int checks = 0, failures = 0, cyc = 0;
  real pi_ [16], pq_ [16];

  int exp_t [$], exp_m [$], exp_d [$];

  function automatic sym_bits_t rot_decide(sym_bits_t b, int m);
    real x, y, c, s, d, bd;
    int best;
    c = $cos(m * PI / 6.0); s = $sin(m * PI / 6.0);
    x = pi_[b] * c - pq_[b] * s;
    y = pi_[b] * s + pq_[b] * c;
    bd = 1e9; best = 0;
    for (int k = 0; k < 16; k++) begin
      d = (x - pi_[k]) ** 2 + (y - pq_[k]) ** 2;
      if (d < bd) begin bd = d; best = k; end
    end
    return sym_bits_t'(best);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && found) begin
      checks++;
      if (exp_t.size() == 0) begin
        failures++; $display("FAIL: detection with no marker (idx %0d dist %0d)", idx, min_dist);
      end else begin
        int t, m, d;
        t = exp_t.pop_front(); m = exp_m.pop_front(); d = exp_d.pop_front();
        if (cyc - t != 11 || idx != 4'(m) || min_dist != 9'(d)) begin
          failures++;
          $display("FAIL: latency %0d idx %0d/%0d dist %0d/%0d", cyc - t, idx, m, min_dist, d);
        end
      end
    end
  end

  task automatic send(sym_bits_t b);
    bits <= b; dec_valid <= 1;
    @(posedge clk);
    dec_valid <= 0;
    repeat (GAP - 1) @(posedge clk);
  endtask

  initial begin
    logic [ASM_BITS-1:0] marker;
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
    // the default marker: m-sequence of x^8+x^6+x^5+x^4+1 from all ones, then 0
    begin
      logic [7:0] s;
      s = 8'hFF; marker = '0;
      for (int k = 0; k < 255; k++) begin
        marker[ASM_BITS-1-k] = s[7];
        s = {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
      end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 14; n++) begin
      int m, nerr;
      logic [ASM_BITS-1:0] rx;
      repeat ($urandom_range(80, 200)) send(sym_bits_t'($urandom_range(0, 15)));
      m = (n < 12) ? n : $urandom_range(0, 11);
      for (int s = 0; s < ASM_SYMS; s++)
        rx[ASM_BITS-1-4*s -: 4] = rot_decide(marker[ASM_BITS-1-4*s -: 4], m);
      nerr = $urandom_range(0, 30);
      for (int k = 0; k < nerr; k++) rx[k * 8 + $urandom_range(0, 7)] ^= 1'b1;
      for (int s = 0; s < ASM_SYMS; s++) begin
        if (s == ASM_SYMS - 1) begin
          exp_t.push_back(cyc + 1); exp_m.push_back(m); exp_d.push_back(nerr);
        end
        send(rx[ASM_BITS-1-4*s -: 4]);
      end
    end
    repeat (100) send(sym_bits_t'($urandom_range(0, 15)));
    checks++;
    if (exp_t.size() != 0) begin failures++; $display("FAIL: %0d markers not detected", exp_t.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
