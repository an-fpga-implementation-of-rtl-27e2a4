// tb_output_controller: symbols are written every sixth cycle (the receiver
// delivers one every 40 or so), each with four LLRs that encode the symbol's serial number and the LLR position.
// Markers (asm_found, in the cycle between two symbols) are placed at chosen
// points. Checks: nothing is sent before the first marker; after each later
// marker, exactly the symbols written since the previous accepted marker,
// less the newest 64, come out in order, MSB LLR first, one LLR per cycle,
// with frame_start on the first only; a marker that arrives while a codeword
// is still being sent is counted in overruns and is otherwise ignored.
// Stimulus, reference model and tolerances are this testbench's own; the
// expected behaviour, rates and latencies are those stated in the module's
// header, which marks what follows the thesis.
module tb_output_controller;
  import apsk_pkg::*;
  logic clk = 0, rst = 1, llr_valid = 0, asm_found = 0;
  llr_t llr [4] = '{default: '0};
  logic llr_wr_en, frame_start;
  llr_t llr_out;
  logic [15:0] overruns;
  always #5 clk = ~clk;
  output_controller dut (.*);
  int checks = 0, failures = 0;
  int n_written = 0, n_frames = 0;
  llr_t expected [$];
  bit   exp_first [$];

  always @(posedge clk) begin
    if (!rst && llr_wr_en) begin
      checks++;
      if (expected.size() == 0) begin
        failures++; $display("FAIL: unexpected LLR %h", llr_out);
      end else begin
        llr_t ex;
        bit   ef;
        ex = expected.pop_front(); ef = exp_first.pop_front();
        if (llr_out != ex || frame_start != ef) begin
          failures++;
          $display("FAIL: LLR %h/%h frame_start %b/%b", llr_out, ex, frame_start, ef);
        end
        if (ef) n_frames++;
      end
    end
  end

  task automatic symbols(int n);
    repeat (n) begin
      for (int k = 0; k < 4; k++) llr[k] <= llr_t'({n_written[13:0], 2'(k)});
      llr_valid <= 1;
      @(posedge clk);
      llr_valid <= 0;
      n_written++;
      repeat (5) @(posedge clk);
    end
  endtask

  int fstart = -1;
  task automatic marker(bit ignored);
    llr_valid <= 0;
    asm_found <= 1;
    @(posedge clk);
    asm_found <= 0;
    if (!ignored) begin
      if (fstart >= 0) begin
        for (int s = fstart; s < n_written - ASM_SYMS; s++)
          for (int k = 3; k >= 0; k--) begin
            expected.push_back(llr_t'({s[13:0], 2'(k)}));
            exp_first.push_back(s == fstart && k == 3);
          end
      end
      fstart = n_written;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    symbols(300);
    marker(0);                 // first marker: frame start only
    symbols(64 + 200);
    marker(0);                 // codeword of 200 symbols (800 LLRs)
    symbols(64 + 500);
    marker(0);                 // codeword of 500 symbols, 2000 cycles to send
    symbols(100);
    marker(1);                 // arrives while sending: ignored
    symbols(900);
    marker(0);                 // codeword from the last accepted marker
    symbols(64 + 1344);
    marker(0);                 // a full frame of 1344 symbols
    repeat (6000) @(posedge clk);
    symbols(64 + 1);
    marker(0);                 // shortest codeword
    repeat (6000) @(posedge clk);
    checks += 3;
    if (expected.size() != 0) begin failures++; $display("FAIL: %0d LLRs not sent", expected.size()); end
    if (overruns != 1)        begin failures++; $display("FAIL: overruns %0d, expected 1", overruns); end
    if (n_frames != 5)        begin failures++; $display("FAIL: %0d codewords, expected 5", n_frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #700000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
