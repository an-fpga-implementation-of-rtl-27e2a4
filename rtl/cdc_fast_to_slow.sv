// cdc_fast_to_slow: carries a pulse from the fast (400 MHz) to the slow
// (125 MHz) clock domain.
//
// A fast pulse is shorter than a slow period and could fall between two slow
// edges. The pulse therefore enters a chain of STAGES fast flip-flops whose
// OR is held high for STAGES fast cycles; with the fast clock 3.2 times the
// slow one, four stages (10 ns) always cover one slow edge (8 ns period).
// The stretched level is then taken into the slow domain by two slow
// flip-flops, and the output is a one-cycle slow pulse on its rising edge.
// The stretching chain and its length of four follow the thesis; the two
// slow synchronizing flip-flops and the edge detector are this design's own.
// Pulses must be at least 2*STAGES fast cycles apart to stay distinct (the
// stretched level must also be low across one slow edge).
module cdc_fast_to_slow #(
  parameter int STAGES = 4
) (
  input  logic clk_fast,
  input  logic clk_slow,
  input  logic rst_fast,     // synchronous resets, active high
  input  logic rst_slow,
  input  logic pulse_fast,
  output logic pulse_slow
);

  logic [STAGES-1:0] stretch;
  logic              held;
  logic [2:0]        sync_q;

  always_ff @(posedge clk_fast) begin
    if (rst_fast) stretch <= '0;
    else          stretch <= {stretch[STAGES-2:0], pulse_fast};
  end

  // registered so the slow domain samples a flip-flop output, not an OR gate
  always_ff @(posedge clk_fast) begin
    if (rst_fast) held <= 1'b0;
    else          held <= pulse_fast | (|stretch[STAGES-2:0]);
  end

  always_ff @(posedge clk_slow) begin
    if (rst_slow) sync_q <= '0;
    else          sync_q <= {sync_q[1:0], held};
  end

  assign pulse_slow = sync_q[1] & ~sync_q[2];

endmodule
