// filter_and_dds: back end of the carrier-phase loop, the carrier loop filter
// followed by the DDS (phase accumulator with wrap and marker correction).
//
// The phase error of a symbol is not filtered at once: it is held and handed
// to the loop filter when the next interpolation cycle starts (start pulse),
// half a symbol later. This built-in delay, taken from the thesis, leaves
// the slower carrier loop a whole sample period for filter, accumulation and
// wrap. Constants are the carrier loop's (K1 = 2.667e-3, K2 = 3.556e-6,
// K0 = Kp = 1).
//
// Interface: ped_valid/e (Q2.13) from the phase detector; start marks the
// next sample; asm_found/asm_idx from the marker detector (already in this
// clock domain). A marker correction is held and added with the next
// accumulator update, so theta changes at most once per sample:
// theta_valid pulses two cycles after a start that had a phase error pending.
module filter_and_dds
  import apsk_pkg::*;
#(
  parameter logic signed [31:0] K1K2 = 32'sd5734975,
  parameter logic signed [31:0] K2   = 32'sd7636
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ped_valid,
  input  err_t       e,
  input  logic       start,
  input  logic       asm_found,
  input  logic [3:0] asm_idx,
  output logic       theta_valid,
  output loop_t      theta,
  output angle_t     theta_q12,
  output logic       wrapped
);

  err_t       e_hold;
  logic       pending, v_valid;
  loop_t      v;
  logic       asm_pend;
  logic [3:0] asm_pend_idx;

  // a marker correction waits for the next accumulator update
  always_ff @(posedge clk) begin
    if (rst) begin
      asm_pend     <= 1'b0;
      asm_pend_idx <= '0;
    end else if (asm_found) begin
      asm_pend     <= 1'b1;
      asm_pend_idx <= asm_idx;
    end else if (v_valid) begin
      asm_pend     <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      e_hold  <= '0;
      pending <= 1'b0;
    end else begin
      if (ped_valid) begin
        e_hold  <= e;
        pending <= 1'b1;
      end else if (start) begin
        pending <= 1'b0;
      end
    end
  end

  ppi_loop_filter #(.K1K2(K1K2), .K2(K2), .E_FRAC(13), .V_FRAC(28)) u_filter (
    .clk, .rst,
    .in_valid (start && pending),
    .e        (e_hold),
    .out_valid(v_valid),
    .v
  );

  phase_dds u_dds (
    .clk, .rst,
    .v_valid,
    .v,
    .asm_found(v_valid && asm_pend),
    .asm_idx  (asm_pend_idx),
    .theta_valid,
    .theta,
    .theta_q12,
    .wrapped
  );

endmodule
