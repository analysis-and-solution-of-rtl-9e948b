// tb_output_buffer: self-checking test of the double-buffered output buffer.
//
// Uses a small code word region (8 words) so that overflow is reached.
// Checks: random byte writes to both banks read back through both read
// ports against a testbench copy; writes to one bank leave the other
// intact; code words appended to each bank come back in order through the
// reader, with cw_rd_valid dropping after the last one; the per-bank word
// count; overflow set when a ninth word arrives and dropped on ovf_clear;
// cw_wr_clear empties only the selected bank.
module tb_output_buffer;
  localparam int D = 64, R = 8, LW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en, wr_bank, rd_bank, h_bank;
  logic [5:0] wr_addr, rd_addr, h_addr;
  logic [7:0] wr_data, rd_data, h_data;
  logic cw_wr, cw_wr_clear, ovf_clear, cw_wr_bank, cw_rd_start, cw_rd_bank, cw_rd_ready, cw_rd_valid;
  logic [LW-1:0] cw_wr_data, cw_rd_data;
  logic [3:0] cw_count [2];
  logic overflow;
  int checks = 0, failures = 0;

  output_buffer #(.PSUM_DEPTH(D), .RLE_DEPTH(R), .LEN_W(LW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]    shadow [2][D];
  logic [LW-1:0] cws [2][$];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic push_cw(bit bank, logic [LW-1:0] w);
    cw_wr = 1; cw_wr_bank = bank; cw_wr_data = w;
    @(posedge clk); #1;
    cw_wr = 0;
  endtask

  initial begin
    wr_en = 0; wr_bank = 0; wr_addr = 0; wr_data = 0; rd_bank = 0; rd_addr = 0; h_bank = 0; h_addr = 0;
    cw_wr = 0; cw_wr_clear = 0; ovf_clear = 0; cw_wr_bank = 0; cw_wr_data = 0;
    cw_rd_start = 0; cw_rd_bank = 0; cw_rd_ready = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // fill both banks
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < D; a++) begin
        wr_en = 1; wr_bank = 1'(b); wr_addr = 6'(a); wr_data = 8'($urandom); shadow[b][a] = wr_data;
        @(posedge clk); #1;
      end
    // random overwrites in one bank while checking the other
    for (int i = 0; i < 500; i++) begin
      wr_en = 1; wr_bank = i[0]; wr_addr = 6'($urandom); wr_data = 8'($urandom);
      shadow[wr_bank][wr_addr] = wr_data;
      @(posedge clk); #1;
      wr_en = 0;
      rd_bank = 1'($urandom_range(0, 1)); rd_addr = 6'($urandom);
      h_bank = 1'($urandom_range(0, 1)); h_addr = 6'($urandom);
      #1;
      chk(rd_data == shadow[rd_bank][rd_addr], "reload port");
      chk(h_data == shadow[h_bank][h_addr], "host port");
    end
    // code words: 5 in bank 0, 3 in bank 1
    for (int i = 0; i < 5; i++) begin cws[0].push_back(LW'($urandom)); push_cw(0, cws[0][i]); end
    for (int i = 0; i < 3; i++) begin cws[1].push_back(LW'($urandom)); push_cw(1, cws[1][i]); end
    chk(cw_count[0] == 5 && cw_count[1] == 3, "word counts");
    chk(!overflow, "no overflow yet");
    for (int b = 0; b < 2; b++) begin
      cw_rd_start = 1; cw_rd_bank = 1'(b); @(posedge clk); #1; cw_rd_start = 0;
      for (int i = 0; i < cws[b].size(); i++) begin
        chk(cw_rd_valid, "word available");
        chk(cw_rd_data == cws[b][i], "word order");
        cw_rd_ready = 1'($urandom_range(0, 1));
        if (!cw_rd_ready) begin @(posedge clk); #1; cw_rd_ready = 1; chk(cw_rd_data == cws[b][i], "held"); end
        @(posedge clk); #1; cw_rd_ready = 0;
      end
      chk(!cw_rd_valid, "end of words");
    end
    // overflow of bank 1
    for (int i = 0; i < 6; i++) push_cw(1, LW'(i));
    chk(overflow, "overflow set");
    chk(cw_count[1] == 8, "region full");
    cw_rd_start = 1; cw_rd_bank = 1; @(posedge clk); #1; cw_rd_start = 0;
    for (int i = 0; i < 3; i++) begin cw_rd_ready = 1; @(posedge clk); #1; end
    cw_rd_ready = 0;
    chk(cw_rd_data == 16'd0, "first word after the old ones");
    // clear bank 1 only
    cw_wr_clear = 1; cw_wr_bank = 1; @(posedge clk); #1; cw_wr_clear = 0;
    chk(cw_count[1] == 0 && cw_count[0] == 5, "clear one bank");
    chk(overflow, "overflow sticky");
    ovf_clear = 1; @(posedge clk); #1; ovf_clear = 0;
    chk(!overflow, "overflow cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
