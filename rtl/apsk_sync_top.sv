// apsk_sync_top: 16-APSK receiver core with joint carrier-phase and
// symbol-timing recovery, from IF samples to the LLRs of LDPC codewords.
//
// Data path (slow clock, 125 MHz, the rate of the host interface buffers):
//   ADC samples (fs = 93 1/3 MHz, IF at fs/4) -> if_to_bb -> matched_filter
//   (257 taps, decimation by N/2 = 16 to two samples per symbol) ->
//   ccw_cordic (rotation by the carrier phase estimate)
// Timing and carrier loops (fast clock, 400 MHz):
//   farrow_interp -> apsk_decision (symbol-time samples only) -> zc_ted ->
//   filter_and_counter (strobe, mu back to the interpolator and decision)
//   apsk_decision -> ml_ped -> filter_and_dds (theta back to the rotator)
// Frame handling (slow clock):
//   decisions -> asm_detector (marker position and 30-degree ambiguity,
//   the correction goes to the DDS); interpolants -> llr_calc ->
//   output_controller (codeword LLRs out, marker LLRs dropped).
//
// The split of the blocks over the two clocks, the double flip-flop for
// slow-to-fast signals and the four-register pulse stretch for fast-to-slow
// signals follow the thesis. Multi-bit values cross without their own
// synchronizers: each is written to a register in its source domain before
// its valid pulse crosses, and stays unchanged for much longer than the
// crossing takes (a new sample every 16 ADC samples, a new symbol every 32).
//
// The rotator turns a sample counter-clockwise by -theta, where theta is the
// DDS output; with the phase detector e = y'aI - x'aQ and positive loop
// constants this gives negative feedback (theta converges to the channel's
// phase offset). The marker detector's correction of m*30 degrees is added to
// theta accordingly. This sign arrangement is this design's reading.
//
// Reset: rst is synchronous to clk_slow (the host interface drives it) and is
// carried into the fast domain by a double flip-flop.
// Monitoring outputs: sym_valid/sym_bits (decisions, slow domain), theta
// (Q3.12, slow domain copy), mu (fast domain), asm_found/asm_idx.
// A few internal results are connected but not used here (ctl_valid, v_ted,
// theta_fast, dds_wrapped, asm_dist, oc_overruns): they are kept for
// observation in simulation, and lint reports them as unused.
module apsk_sync_top
  import apsk_pkg::*;
(
  input  logic       clk_slow,
  input  logic       clk_fast,
  input  logic       rst,
  input  logic       adc_valid,
  input  sample_t    adc_sample,
  output logic       llr_wr_en,
  output llr_t       llr_out,
  output logic       frame_start,
  output logic       sym_valid,
  output sym_bits_t  sym_bits,
  output angle_t     theta,
  output logic [15:0] mu,
  output logic       asm_found,
  output logic [3:0] asm_idx
);

  // ------------------------------------------------------------------ resets
  logic rst_fast;
  cdc_slow_to_fast u_rst_sync (.clk_slow, .clk_fast, .d_slow(rst), .q_fast(rst_fast));

  // --------------------------------------------------- slow domain: front end
  logic  bb_valid, mf_valid, ccw_valid;
  cplx_t bb, mf, ccw_r;
  angle_t theta_slow;

  if_to_bb u_if_to_bb (
    .clk(clk_slow), .rst,
    .in_valid(adc_valid), .in_sample(adc_sample),
    .out_valid(bb_valid), .out_bb(bb)
  );

  matched_filter u_mf (
    .clk(clk_slow), .rst,
    .in_valid(bb_valid), .in_bb(bb),
    .out_valid(mf_valid), .out_mf(mf)
  );

  ccw_cordic u_ccw (
    .clk(clk_slow), .rst,
    .in_valid(mf_valid), .in_r(mf), .in_theta(-theta_slow),
    .out_valid(ccw_valid), .out_r(ccw_r)
  );

  // rotated sample held for the fast domain
  cplx_t rot_hold;
  always_ff @(posedge clk_slow) begin
    if (rst)            rot_hold <= '0;
    else if (ccw_valid) rot_hold <= ccw_r;
  end

  logic smp_lvl, smp_lvl_q, smp_start;
  cdc_slow_to_fast u_smp_sync (.clk_slow, .clk_fast, .d_slow(ccw_valid), .q_fast(smp_lvl));
  always_ff @(posedge clk_fast) begin
    if (rst_fast) smp_lvl_q <= 1'b0;
    else          smp_lvl_q <= smp_lvl;
  end
  assign smp_start = smp_lvl & ~smp_lvl_q;

  // ------------------------------------------------ fast domain: timing loop
  logic      interp_valid, dec_valid, ted_valid, ctl_valid, strobe;
  cplx_t     interp_r, a_hat;
  sym_bits_t bits;
  err_t      e_ted;
  loop_t     v_ted;

  farrow_interp u_interp (
    .clk(clk_fast), .rst(rst_fast),
    .in_valid(smp_start), .in_r(rot_hold), .mu,
    .out_valid(interp_valid), .out_r(interp_r)
  );

  apsk_decision u_dec (
    .clk(clk_fast), .rst(rst_fast),
    .en(interp_valid && strobe), .in_r(interp_r),
    .out_valid(dec_valid), .bits, .a_hat
  );

  zc_ted u_ted (
    .clk(clk_fast), .rst(rst_fast),
    .smp_valid(interp_valid), .strobe, .smp(interp_r),
    .dec_valid, .bits, .a_hat,
    .out_valid(ted_valid), .e(e_ted)
  );

  filter_and_counter u_fc (
    .clk(clk_fast), .rst(rst_fast),
    .e_valid(ted_valid), .e(e_ted),
    .ctl_valid, .strobe, .mu, .v(v_ted)
  );

  // ------------------------------------------------- fast domain: phase loop
  logic   ped_valid, theta_valid, dds_wrapped;
  err_t   e_ped;
  loop_t  theta_fast;
  angle_t theta_fast_q12;
  logic   asm_lvl, asm_lvl_q, asm_found_fast;
  logic [3:0] asm_idx_slow_hold;

  ml_ped u_ped (
    .clk(clk_fast), .rst(rst_fast),
    .en(dec_valid), .in_r(interp_r), .a_hat,
    .out_valid(ped_valid), .e(e_ped)
  );

  filter_and_dds u_fd (
    .clk(clk_fast), .rst(rst_fast),
    .ped_valid, .e(e_ped), .start(smp_start),
    .asm_found(asm_found_fast), .asm_idx(asm_idx_slow_hold),
    .theta_valid, .theta(theta_fast), .theta_q12(theta_fast_q12),
    .wrapped(dds_wrapped)
  );

  // --------------------------------------- fast -> slow: decisions and theta
  cplx_t     sym_r_hold;
  sym_bits_t sym_bits_hold;
  logic      sym_pulse;
  always_ff @(posedge clk_fast) begin
    if (rst_fast) begin
      sym_r_hold    <= '0;
      sym_bits_hold <= '0;
      sym_pulse     <= 1'b0;
    end else begin
      sym_pulse <= dec_valid;
      if (dec_valid) begin
        sym_r_hold    <= interp_r;
        sym_bits_hold <= bits;
      end
    end
  end

  logic sym_slow, theta_upd_slow;
  cdc_fast_to_slow u_sym_cdc (
    .clk_fast, .clk_slow, .rst_fast, .rst_slow(rst),
    .pulse_fast(sym_pulse), .pulse_slow(sym_slow)
  );
  cdc_fast_to_slow u_theta_cdc (
    .clk_fast, .clk_slow, .rst_fast, .rst_slow(rst),
    .pulse_fast(theta_valid), .pulse_slow(theta_upd_slow)
  );

  always_ff @(posedge clk_slow) begin
    if (rst)                 theta_slow <= '0;
    else if (theta_upd_slow) theta_slow <= theta_fast_q12;
  end

  // --------------------------------------------------- slow domain: back end
  logic       llr_valid, asm_found_slow;
  llr_t       llr [4];
  logic [3:0] asm_idx_slow;
  logic [8:0] asm_dist;
  logic [15:0] oc_overruns;

  llr_calc u_llr (
    .clk(clk_slow), .rst,
    .en(sym_slow), .in_r(sym_r_hold),
    .out_valid(llr_valid), .llr
  );

  asm_detector u_asm (
    .clk(clk_slow), .rst,
    .dec_valid(sym_slow), .bits(sym_bits_hold),
    .found(asm_found_slow), .idx(asm_idx_slow), .min_dist(asm_dist)
  );

  output_controller u_oc (
    .clk(clk_slow), .rst,
    .llr_valid, .llr, .asm_found(asm_found_slow),
    .llr_wr_en, .llr_out, .frame_start, .overruns(oc_overruns)
  );

  // slow -> fast: marker detection; its rotation index is held in a slow
  // register that is stable before the pulse reaches the fast domain
  always_ff @(posedge clk_slow) begin
    if (rst)                 asm_idx_slow_hold <= '0;
    else if (asm_found_slow) asm_idx_slow_hold <= asm_idx_slow;
  end
  cdc_slow_to_fast u_asm_sync (.clk_slow, .clk_fast, .d_slow(asm_found_slow), .q_fast(asm_lvl));
  always_ff @(posedge clk_fast) begin
    if (rst_fast) asm_lvl_q <= 1'b0;
    else          asm_lvl_q <= asm_lvl;
  end
  assign asm_found_fast = asm_lvl & ~asm_lvl_q;

  // ----------------------------------------------------------- monitoring
  assign sym_valid = sym_slow;
  assign sym_bits  = sym_bits_hold;
  assign theta     = theta_slow;
  assign asm_found = asm_found_slow;
  assign asm_idx   = asm_idx_slow;

endmodule
