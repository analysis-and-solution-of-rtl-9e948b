// tb_rle_decoder: self-checking test of the bit-level run-length decoder.
//
// A random list of code words (run bit, length-1) is offered to the decoder
// with random gaps in word availability and random consumer back-pressure.
// Every delivered bit is compared with the expansion of the list. A second
// pass with words always available and the consumer always ready checks
// that the decoder delivers one bit per cycle with no bubble between runs
// (total cycles = total bits). A final check uses clear in mid-run.
module tb_rle_decoder;
  localparam int LW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, cw_valid, cw_ready, out_valid, out_bit, out_ready;
  logic [LW-1:0] cw;
  int checks = 0, failures = 0;

  rle_decoder #(.LEN_W(LW)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [LW-1:0] words[$];
  bit            bits[$];

  task automatic make_list(int n);
    words.delete(); bits.delete();
    for (int i = 0; i < n; i++) begin
      logic [LW-1:0] w;
      w = LW'($urandom);
      if ($urandom_range(0, 2) == 0) w[LW-2:0] = '0;   // many runs of one
      words.push_back(w);
      for (int k = 0; k <= int'(w[LW-2:0]); k++) bits.push_back(w[LW-1]);
    end
  endtask

  task automatic run(bit random_gaps, output int cycles);
    int wi = 0, bi = 0;
    cycles = 0;
    while (bi < bits.size()) begin
      cw_valid  = (wi < words.size()) && (!random_gaps || $urandom_range(0, 3) != 0);
      cw        = (wi < words.size()) ? words[wi] : '0;
      out_ready = !random_gaps || $urandom_range(0, 2) != 0;
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_bit != bits[bi]) begin
          failures++;
          if (failures < 10) $display("bit %0d: got %0b exp %0b", bi, out_bit, bits[bi]);
        end
        bi++;
      end
      if (cw_valid && cw_ready) wi++;
      @(posedge clk); #1;
      cycles++;
      if (cycles > 100000) break;
    end
    cw_valid = 0; out_ready = 0;
  endtask

  initial begin
    int cycles;
    clear = 0; cw_valid = 0; cw = '0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int r = 0; r < 20; r++) begin
      make_list(200);
      run(1, cycles);
    end
    make_list(500);
    run(0, cycles);
    checks++;
    if (cycles != bits.size()) begin failures++; $display("rate: %0d cycles for %0d bits", cycles, bits.size()); end
    // clear in the middle of a long run
    cw = {1'b1, {(LW-1){1'b1}}}; cw_valid = 1; out_ready = 1;
    @(posedge clk); #1;
    cw_valid = 0; out_ready = 0;
    checks++; if (!out_valid) begin failures++; $display("run not held"); end
    clear = 1; @(posedge clk); #1; clear = 0;
    checks++; if (out_valid) begin failures++; $display("clear did not drop run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
