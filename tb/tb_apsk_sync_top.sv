// tb_apsk_sync_top: end-to-end test of the receiver core at its default
// parameters.
//
// A transmitter model builds frames of a 64-symbol marker followed by 1280
// payload symbols (PN9 bits, x^9 + x^5 + 1), shapes them with the 513-tap
// windowed SRRC pulse at 32 samples per symbol, and puts them on an IF of a
// quarter of the sample rate. The channel adds a carrier phase offset, a
// small carrier frequency offset, a fractional timing offset and a sample
// clock offset. Samples enter on three of every four 125 MHz cycles; the loops
// run on a 400 MHz clock.
//
// Checks: every codeword the receiver emits once it is locked (both markers
// around it detected without rotation) must be 5120 LLRs long, start with
// frame_start, and its hard decisions (LLR > 0 means 1) must equal the
// payload bits of one transmitted frame exactly. At least one such frame must
// come out. The test also counts, and requires at least once each: symbol
// strobes, a strobe interval other than two samples (the timing loop
// absorbing the clock offset), a marker detection that corrected a rotated
// lock (index > 0), a marker detection with no correction (index 0), a wrap
// of the phase accumulator, and a codeword read out of the frame buffer.
// The final phase estimate must match the channel phase within 3 degrees.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_apsk_sync_top;
  import apsk_pkg::*;

  localparam int    NSPS    = 32;
  localparam int    PAYLOAD = 1280;
  localparam int    FRAME   = ASM_SYMS + PAYLOAD;
  localparam int    NFRAMES = 5;
  localparam int    NSYM    = NFRAMES * FRAME + 20;
  localparam real   PI      = 3.14159265358979;
  localparam real   ALPHA   = 0.4051;
  localparam real   BETA    = 2.8299;
  localparam real   PHI0    = 100.0 * PI / 180.0;   // carrier phase offset
  localparam real   DPHI    = 5.0e-4 / NSPS;        // rad per sample
  localparam real   TAU     = 11.3;                 // timing offset, samples
  localparam real   PPM     = 200.0e-6;             // sample clock offset

  logic clk_slow = 0, clk_fast = 0, rst = 1;
  always #4ns    clk_slow = ~clk_slow;
  always #1.25ns clk_fast = ~clk_fast;

  logic        adc_valid = 0;
  sample_t     adc_sample = '0;
  logic        llr_wr_en, frame_start, sym_valid, asm_found;
  llr_t        llr_out;
  sym_bits_t   sym_bits;
  angle_t      theta;
  logic [15:0] mu;
  logic [3:0]  asm_idx;

  apsk_sync_top dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ transmitter
  sym_bits_t tx_sym [NSYM];
  logic      pay_bits [NFRAMES][PAYLOAD*4];

  function automatic real bessel_i0(real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 30; k++) begin
      t = t * (x / (2.0 * k)) * (x / (2.0 * k));
      s += t;
    end
    return s;
  endfunction

  real i0b;
  function automatic real pulse(real t);        // t in samples
    real x, num, den, w, a;
    if (t <= -256.0 || t >= 256.0) return 0.0;
    x = t / NSPS;
    if (x > -1e-9 && x < 1e-9) x = 1e-9;
    a = 4.0 * ALPHA * x;
    if (a > 0.999999 && a < 1.000001) x = x + 1e-6;
    if (a < -0.999999 && a > -1.000001) x = x + 1e-6;
    num = $sin(PI * (1.0 - ALPHA) * x) + 4.0 * ALPHA * x * $cos(PI * (1.0 + ALPHA) * x);
    den = PI * x * (1.0 - (4.0 * ALPHA * x) ** 2);
    w = bessel_i0(BETA * $sqrt(1.0 - (t / 256.0) ** 2)) / i0b;
    return num / den / $sqrt(NSPS) * w;
  endfunction

  function automatic void point(sym_bits_t b, output real pi_, output real pq_);
    real r2, r1, ang, rad;
    r2 = $sqrt(16.0 / (12.0 + 4.0 / (2.75 * 2.75)));
    r1 = r2 / 2.75;
    case (b[3:2])
      2'b01:   begin ang = 15.0; rad = r2; end
      2'b00:   begin ang = 45.0; rad = r2; end
      2'b10:   begin ang = 75.0; rad = r2; end
      default: begin ang = 45.0; rad = r1; end
    endcase
    pi_ = rad * $cos(ang * PI / 180.0);
    pq_ = rad * $sin(ang * PI / 180.0);
    if (b[1]) pi_ = -pi_;
    if (b[0]) pq_ = -pq_;
  endfunction

  real sym_i [NSYM], sym_q [NSYM];

  initial begin
    logic [8:0] pn;
    logic [ASM_BITS-1:0] marker;
    logic b;
    i0b = bessel_i0(BETA);
    marker = default_asm();
    pn = 9'h1FF;
    for (int f = 0; f < NFRAMES; f++) begin
      for (int s = 0; s < ASM_SYMS; s++)
        tx_sym[f*FRAME + s] = marker[ASM_BITS-1-4*s -: 4];
      for (int s = 0; s < PAYLOAD; s++) begin
        sym_bits_t sb;
        for (int k = 3; k >= 0; k--) begin
          b = pn[8] ^ pn[4];
          pn = {pn[7:0], b};
          sb[k] = b;
          pay_bits[f][4*s + 3 - k] = b;
        end
        tx_sym[f*FRAME + ASM_SYMS + s] = sb;
      end
    end
    for (int s = NFRAMES*FRAME; s < NSYM; s++) tx_sym[s] = 4'b0000;
    for (int s = 0; s < NSYM; s++) point(tx_sym[s], sym_i[s], sym_q[s]);
  end

  function automatic real tx_if(int n);
    real t, si, sq, p, ph;
    int  k0;
    t  = n * (1.0 + PPM) - TAU;           // transmitter time in samples
    si = 0.0; sq = 0.0;
    k0 = int'($floor(t / NSPS));
    for (int k = k0 - 8; k <= k0 + 9; k++) begin
      if (k >= 0 && k < NSYM) begin
        p = pulse(t - k * NSPS);
        si += sym_i[k] * p;
        sq += sym_q[k] * p;
      end
    end
    ph = PHI0 + DPHI * n + PI / 2.0 * (n % 4);
    return 2.0 * (si * $cos(ph) - sq * $sin(ph));
  endfunction

  // ------------------------------------------------------------ stimulus
  int n_adc = 0;
  localparam int NSAMP = (NSYM - 10) * NSPS;
  int cyc = 0;
  always @(posedge clk_slow) begin
    cyc <= cyc + 1;
    if (!rst && (cyc % 4 != 3) && n_adc < NSAMP) begin
      real x;
      x = tx_if(n_adc) * 8192.0;
      adc_valid  <= 1'b1;
      adc_sample <= sample_t'($rtoi(x >= 0 ? x + 0.5 : x - 0.5));
      n_adc      <= n_adc + 1;
    end else begin
      adc_valid <= 1'b0;
    end
  end

  // ------------------------------------------------------------ monitors
  int n_strobe = 0, n_skipstuff = 0, n_asm_corr = 0, n_asm_zero = 0;
  int n_wrap = 0, n_frames = 0, n_good_frames = 0, since = 0;

  always @(posedge clk_fast) begin
    if (!rst && dut.interp_valid) begin
      if (dut.strobe) begin
        n_strobe <= n_strobe + 1;
        if (since != 2 && n_strobe > 100) n_skipstuff <= n_skipstuff + 1;
        since <= 1;
      end else begin
        since <= since + 1;
      end
    end
    if (!rst && dut.dds_wrapped) n_wrap <= n_wrap + 1;
  end

  int det_idx [$];
  always @(posedge clk_slow) begin
    if (!rst && asm_found) begin
      det_idx.push_back(int'(asm_idx));
      $display("[%0t] marker found, rotation index %0d, distance %0d, theta %0.1f deg",
               $time, asm_idx, dut.asm_dist, real'(theta) / 4096.0 * 180.0 / PI);
      if (asm_idx != 0) n_asm_corr++;
      else              n_asm_zero++;
    end
  end

  // codeword capture and comparison
  logic rx_bits [$];
  task automatic check_frame();
    int best_f = -1;
    bit strict;
    if (rx_bits.size() == 0) return;
    n_frames++;
    // codeword n lies between the n-th and (n+1)-th detected markers; it
    // must be exact when neither marker needed a correction (loop locked at
    // the right point throughout). Earlier ones are reported only.
    strict = det_idx.size() > n_frames && det_idx[n_frames-1] == 0 && det_idx[n_frames] == 0;
    if (!strict) begin
      $display("[%0t] codeword %0d received during acquisition, not checked", $time, n_frames);
      rx_bits.delete();
      return;
    end
    checks++;
    if (rx_bits.size() != PAYLOAD*4) begin
      failures++;
      $display("FAIL: codeword of %0d LLRs, expected %0d", rx_bits.size(), PAYLOAD*4);
    end else begin
      for (int f = 0; f < NFRAMES; f++) begin
        int errs = 0;
        for (int k = 0; k < PAYLOAD*4; k++) if (rx_bits[k] != pay_bits[f][k]) errs++;
        if (errs == 0) best_f = f;
      end
      if (best_f < 0) begin
        failures++;
        $display("FAIL: codeword %0d matches no transmitted frame", n_frames);
      end else begin
        n_good_frames++;
        $display("[%0t] codeword %0d = payload of frame %0d, no bit errors", $time, n_frames, best_f);
      end
    end
    rx_bits.delete();
  endtask

  always @(posedge clk_slow) begin
    if (!rst && llr_wr_en) begin
      if (frame_start) check_frame();
      rx_bits.push_back(llr_out > 0);
    end
  end

  // ------------------------------------------------------------ sequence
  initial begin
    repeat (10) @(posedge clk_slow);
    rst <= 1'b0;
    wait (n_adc >= NSAMP);
    repeat (2000) @(posedge clk_slow);
    check_frame();
    begin
      real th, ch, d;
      th = real'(theta) / 4096.0;
      ch = PHI0 + DPHI * n_adc;
      d  = th - ch;
      while (d > PI)  d -= 2.0 * PI;
      while (d < -PI) d += 2.0 * PI;
      checks++;
      if (d > 3.0 * PI / 180.0 || d < -3.0 * PI / 180.0) begin
        failures++;
        $display("FAIL: phase estimate %0.2f deg, channel %0.2f deg", th * 180.0 / PI, ch * 180.0 / PI);
      end
    end
    $display("mechanisms: strobes=%0d skip/stuff=%0d marker_corrections=%0d marker_index0=%0d dds_wraps=%0d codewords=%0d good=%0d",
             n_strobe, n_skipstuff, n_asm_corr, n_asm_zero, n_wrap, n_frames, n_good_frames);
    checks += 6;
    if (n_strobe == 0)      begin failures++; $display("FAIL: no strobes"); end
    if (n_skipstuff == 0)   begin failures++; $display("FAIL: no strobe interval other than 2"); end
    if (n_asm_corr == 0)    begin failures++; $display("FAIL: no marker correction"); end
    if (n_asm_zero == 0)    begin failures++; $display("FAIL: no marker at index 0"); end
    if (n_wrap == 0)        begin failures++; $display("FAIL: phase accumulator never wrapped"); end
    if (n_good_frames == 0) begin failures++; $display("FAIL: no correct codeword"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(real'(NSAMP) * 8.0 * 1.5 * 1ns);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
