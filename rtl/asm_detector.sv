// asm_detector: finds the 256-bit attached synchronization marker (ASM) in
// the stream of symbol decisions and reports how it is rotated.
//
// The carrier loop can lock at any of 12 points 30 degrees apart. The twelve
// possible rotated copies of the marker, as bit sequences (each symbol of the
// marker rotated by m*30 degrees and decided again), are constants built at
// elaboration from the MARKER parameter. The last 64 decisions (256 bits) are
// kept in a shift register; after each decision the register is XORed with
// every copy, the ones of each XOR word are counted by an adder tree of
// eight registered stages (pairs, then sums of pairs, ... log2(256) = 8),
// the smallest count is found, and a detection is reported if it is below
// THRESH (64). The index m of that copy is the phase correction, m*30 deg.
// The method, the 12 copies, the eight counting stages and the threshold
// follow the thesis. The marker itself is defined by a telemetry standard
// that the thesis cites without listing its bits; MARKER defaults to a
// stand-in (see apsk_pkg::default_asm) and should be set to the real one.
//
// Interface: dec_valid/bits, one decision per symbol, first transmitted bit
// in bits[3]. found pulses with idx (0..11) and min_dist eleven cycles after
// the decision that completes the marker; decisions must be at least that
// far apart for the pulse to mark the right symbol (they are 32 ADC samples
// apart in the receiver). The last symbol of the marker is the newest
// decision when found is reported.
module asm_detector
  import apsk_pkg::*;
#(
  parameter logic [ASM_BITS-1:0] MARKER = default_asm(),
  parameter int                  THRESH = 64
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       dec_valid,
  input  sym_bits_t  bits,
  output logic       found,
  output logic [3:0] idx,
  output logic [8:0] min_dist
);

  localparam int NROT = 12;
  localparam int LEVELS = 8;

  logic [ASM_BITS-1:0] window;
  logic [8:0]          total [NROT];
  logic [LEVELS+1:0]   vpipe;

  always_ff @(posedge clk) begin
    if (rst) begin
      window <= '0;
    end else if (dec_valid) begin
      window <= {window[ASM_BITS-5:0], bits};
    end
  end

  // one XOR and adder tree per rotated copy: level 0 holds the mismatch
  // bits, levels 1..8 the pairwise sums, each level a register stage
  for (genvar m = 0; m < NROT; m++) begin : g_rot
    localparam logic [ASM_BITS-1:0] ROT = rotate_asm(MARKER, m);
    logic [8:0] cnt [LEVELS+1][ASM_BITS];

    always_ff @(posedge clk) begin
      for (int j = 0; j < ASM_BITS; j++)
        cnt[0][j] <= 9'(window[j] ^ ROT[j]);
      for (int l = 1; l <= LEVELS; l++)
        for (int j = 0; j < (ASM_BITS >> l); j++)
          cnt[l][j] <= cnt[l-1][2*j] + cnt[l-1][2*j+1];
    end

    assign total[m] = cnt[LEVELS][0];
  end

  // valid travels with the data: window update, level 0, levels 1..8
  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[LEVELS:0], dec_valid};
  end

  // minimum over the copies and the threshold test
  logic [8:0] best_cnt;
  logic [3:0] best_idx;
  always_comb begin
    best_cnt = total[0];
    best_idx = '0;
    for (int m = 1; m < NROT; m++) begin
      if (total[m] < best_cnt) begin
        best_cnt = total[m];
        best_idx = 4'(m);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      found    <= 1'b0;
      idx      <= '0;
      min_dist <= '0;
    end else begin
      found <= 1'b0;
      if (vpipe[LEVELS+1]) begin
        found    <= (best_cnt < 9'(THRESH));
        idx      <= best_idx;
        min_dist <= best_cnt;
      end
    end
  end

endmodule
