// output_controller: frame buffer between the LLR calculation and the LDPC
// decoder interface. It passes on the LLRs of each codeword and drops those
// of the frame marker.
//
// LLRs are computed for every symbol, the marker's included, and the LLR
// block knows nothing of frames. So every symbol's four LLRs are written to a
// circular buffer (one word of four LLRs per symbol) and counted. When the
// marker detector reports a marker, the symbols stored since the previous
// marker, less the newest MARKER_SYMS (64 symbols = 256 LLRs, which are the
// marker itself), are one codeword: they are read out one LLR per clock, MSB
// LLR first, with llr_wr_en high, and frame_start on the first one. The
// buffer-and-count scheme and the exclusion of the newest 256 LLRs follow the
// thesis; the buffer depth, the read-out order, the frame_start flag and
// the rule that nothing is sent before the first marker has marked a frame
// start are this design's choices. A marker that arrives while a codeword is
// still being read out is counted in overruns and ignored.
//
// Interface: llr_valid/llr (four Q4.11 values) once per symbol; asm_found
// must arrive after the marker's last LLRs were written and before the next
// symbol's (the marker detector's latency is eleven cycles against a symbol
// period of at least 32 cycles). The output drives the decoder's (host's)
// write port: llr_wr_en, llr_out, frame_start. Read latency from the buffer
// is one cycle (block RAM style).
module output_controller
  import apsk_pkg::*;
#(
  parameter int DEPTH       = 2048,      // symbols held (frame is 1344)
  parameter int MARKER_SYMS = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        llr_valid,
  input  llr_t        llr [4],
  input  logic        asm_found,
  output logic        llr_wr_en,
  output llr_t        llr_out,
  output logic        frame_start,
  output logic [15:0] overruns
);

  localparam int AW = $clog2(DEPTH);

  logic [63:0]   mem [DEPTH];
  logic [AW-1:0] wr_ptr, frame_ptr, rd_ptr, rd_end;
  logic          have_start, reading, first;
  logic [1:0]    sub;
  logic [63:0]   rd_word;
  logic          rd_word_valid;
  logic [1:0]    rd_sub;
  logic          rd_first;

  always_ff @(posedge clk) begin
    if (llr_valid) mem[wr_ptr] <= {llr[3], llr[2], llr[1], llr[0]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr     <= '0;
      frame_ptr  <= '0;
      rd_ptr     <= '0;
      rd_end     <= '0;
      have_start <= 1'b0;
      reading    <= 1'b0;
      first      <= 1'b0;
      sub        <= '0;
      overruns   <= '0;
    end else begin
      if (llr_valid) wr_ptr <= wr_ptr + 1'b1;

      if (asm_found) begin
        if (reading) begin
          overruns <= overruns + 1'b1;
        end else begin
          if (have_start && (wr_ptr - AW'(MARKER_SYMS) != frame_ptr)) begin
            reading <= 1'b1;
            first   <= 1'b1;
            rd_ptr  <= frame_ptr;
            rd_end  <= wr_ptr - AW'(MARKER_SYMS);
            sub     <= '0;
          end
          frame_ptr  <= wr_ptr;
          have_start <= 1'b1;
        end
      end else if (reading) begin
        first <= 1'b0;
        sub   <= sub + 1'b1;
        if (sub == 2'd3) begin
          rd_ptr <= rd_ptr + 1'b1;
          if (rd_ptr + 1'b1 == rd_end) reading <= 1'b0;
        end
      end
    end
  end

  // read port: one word per symbol, held for its four LLRs
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_word_valid <= 1'b0;
      rd_sub        <= '0;
      rd_first      <= 1'b0;
      rd_word       <= '0;
    end else begin
      rd_word_valid <= reading && !asm_found;
      rd_sub        <= sub;
      rd_first      <= first;
      rd_word       <= mem[rd_ptr];
    end
  end

  always_comb begin
    llr_wr_en   = rd_word_valid;
    frame_start = rd_word_valid && rd_first;
    unique case (rd_sub)
      2'd0:    llr_out = rd_word[63:48];
      2'd1:    llr_out = rd_word[47:32];
      2'd2:    llr_out = rd_word[31:16];
      default: llr_out = rd_word[15:0];
    endcase
  end

endmodule
