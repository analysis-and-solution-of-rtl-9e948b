// tb_operand_buffer: self-checking test of the double-buffered operand buffer.
//
// A writer process fills chunks of random length (1..DEPTH sets) with random
// gaps; a reader process drains them with random back-pressure. Every set
// read is compared with the set written at the same position of the stream,
// so order, chunk boundaries and bank alternation are all checked. Also
// checked: with the reader held off, exactly two chunks are accepted before
// fill_ready drops (both banks full), and the first is readable while the
// second is being written (overlap).
module tb_operand_buffer;
  import cnn_pkg::*;
  localparam int NP = 3, NM = 2, D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fill_valid, fill_ready, fill_last, out_valid, out_ready;
  ifmap_t  fill_ifmap [NP], out_ifmap [NP];
  weight_t fill_weight [NM], out_weight [NM];
  int checks = 0, failures = 0;

  operand_buffer #(.N_PE(NP), .N_MAC(NM), .DEPTH(D)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [(NP+NM)*8-1:0] set_t;
  set_t sent[$];
  int   chunk_len[$];
  int   n_read = 0, overlap = 0;
  bit   reader_on = 0;

  function automatic set_t pack_out();
    set_t v;
    for (int p = 0; p < NP; p++) v[p*8 +: 8] = out_ifmap[p];
    for (int m = 0; m < NM; m++) v[(NP+m)*8 +: 8] = out_weight[m];
    return v;
  endfunction

  task automatic write_chunk(int len, bit gaps);
    for (int i = 0; i < len; i++) begin
      set_t v;
      v = set_t'({$urandom, $urandom});
      for (int p = 0; p < NP; p++) fill_ifmap[p] = v[p*8 +: 8];
      for (int m = 0; m < NM; m++) fill_weight[m] = v[(NP+m)*8 +: 8];
      fill_last = (i == len - 1);
      while (gaps && $urandom_range(0, 3) == 0) begin
        fill_valid = 0; @(posedge clk); #1;
      end
      fill_valid = 1;
      do begin
        #0;
        if (out_valid && i > 0) overlap++;
        @(posedge clk);
      end while (!fill_ready);
      #1;
      sent.push_back(v);
    end
    fill_valid = 0; fill_last = 0;
  endtask

  // reader: compare every accepted set with the stream written
  always @(negedge clk) out_ready = reader_on && ($urandom_range(0, 2) != 0);
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (n_read >= sent.size() || pack_out() != sent[n_read]) begin
        failures++;
        if (failures < 10) $display("set %0d differs", n_read);
      end
      n_read++;
    end
  end

  initial begin
    fill_valid = 0; fill_last = 0; out_ready = 0;
    foreach (fill_ifmap[p]) fill_ifmap[p] = '0;
    foreach (fill_weight[m]) fill_weight[m] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // reader held off: two chunks fit, a third is refused
    write_chunk(5, 0);
    write_chunk(D, 0);
    checks++; if (fill_ready) begin failures++; $display("third chunk accepted"); end
    checks++; if (!out_valid) begin failures++; $display("no chunk readable"); end
    reader_on = 1;
    for (int c = 0; c < 60; c++) write_chunk($urandom_range(1, D), 1);
    while (n_read < sent.size()) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++; if (out_valid) begin failures++; $display("data left after draining"); end
    checks++; if (n_read != sent.size()) begin failures++; $display("read %0d of %0d", n_read, sent.size()); end
    checks++; if (overlap == 0) begin failures++; $display("no overlap of fill and read"); end
    $display("sets=%0d overlapped fill cycles=%0d", n_read, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
