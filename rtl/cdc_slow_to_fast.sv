// cdc_slow_to_fast: double flip-flop synchronizer for a signal going from the
// slow (125 MHz) to the fast (400 MHz) clock domain.
//
// The signal is first registered in the slow domain so that the crossing
// starts from a flip-flop, then passes two flip-flops in the fast domain; the
// second one gives a first flip-flop that went metastable a full fast cycle to
// settle before the value fans out. This three-register chain is the one the
// thesis draws. Latency: one slow edge plus two fast edges.
// A one-cycle slow pulse arrives as a level that lasts about 3.2 fast cycles;
// receivers detect its rising edge. Reset is not applied here (the chain only
// delays its input), so the output settles within three edges of reset.
module cdc_slow_to_fast #(
  parameter int WIDTH = 1
) (
  input  logic             clk_slow,
  input  logic             clk_fast,
  input  logic [WIDTH-1:0] d_slow,
  output logic [WIDTH-1:0] q_fast
);

  logic [WIDTH-1:0] src_q, meta_q;

  always_ff @(posedge clk_slow) src_q <= d_slow;

  always_ff @(posedge clk_fast) begin
    meta_q <= src_q;
    q_fast <= meta_q;
  end

endmodule
