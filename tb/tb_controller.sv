// tb_controller: self-checking test of the tile sequencer.
//
// Runs several operations (tiles x groups x steps, including zero steps and
// a single tile) with a random in_valid pattern and counts what the
// controller does: bias loads, psum reload cycles, MAC steps, stores,
// encoded bits, flushes, OFMAP stores, bank alternation and the store/
// reload address sequences. The number of cycles from start to done is
// checked against the schedule: per tile 1 cycle, plus per group (1 bias or
// N_PE*N_MAC reload cycles) + steps + stalls + N_PE*N_MAC store cycles,
// plus 2 flush cycles for every tile but the last.
module tb_controller;
  import cnn_pkg::*;
  localparam int NP = 6, NM = 8, NO = NP * NM;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, in_ready, mac_en, ld_all, final_q, buf_wr_en, bank_w;
  logic enc_valid, enc_flush, dec_ready, dec_clear, cw_rd_start, cw_wr_clear, ovf_clear;
  logic busy, done, result_bank;
  logic [15:0] n_tiles;
  logic [7:0] n_groups;
  logic [15:0] n_steps;
  load_e ld;
  logic [2:0] sel_pe, sel_mac;
  logic [11:0] buf_addr;
  int checks = 0, failures = 0;

  controller #(.N_PE(NP), .N_MAC(NM), .AW(12)) dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_op(int t, int g, int s);
    int n_bias = 0, n_reload = 0, n_step = 0, n_store = 0, n_enc = 0, n_flush = 0;
    int n_final = 0, n_stall = 0, n_busy = 0, n_done = 0, n_begin = 0;
    int exp_addr_st = 0, exp_addr_ld = 0, tile_idx = -1, addr_err = 0, bank_err = 0;
    n_tiles = 16'(t); n_groups = 8'(g); n_steps = 16'(s);
    start = 1; @(posedge clk); #1; start = 0;
    while (!done) begin
      in_valid = $urandom_range(0, 3) != 0;
      #1;
      n_busy++;
      if (cw_wr_clear) begin
        n_begin++; tile_idx++; exp_addr_st = 0; exp_addr_ld = 0;
        if (bank_w != tile_idx[0]) bank_err++;
      end
      if (ld == LD_BIAS && ld_all) n_bias++;
      if (ld == LD_PSUM) begin
        n_reload++;
        if (!dec_ready || int'(buf_addr) != exp_addr_ld) addr_err++;
        exp_addr_ld++;
      end
      if (in_ready && !in_valid) n_stall++;
      if (mac_en) n_step++;
      if (buf_wr_en) begin
        n_store++;
        if (int'(buf_addr) != exp_addr_st) addr_err++;
        exp_addr_st++;
        if (final_q) n_final++;
      end
      if (enc_valid) n_enc++;
      if (enc_flush) n_flush++;
      @(posedge clk); #1;
      if (n_busy > 200000) break;
    end
    n_done = 1;
    chk(n_begin == t, "tile count");
    chk(n_bias == g, "bias loads");
    chk(n_reload == (t - 1) * g * NO, "psum reload cycles");
    chk(n_step == t * g * s, "MAC steps");
    chk(n_store == t * g * NO, "stores");
    chk(n_final == g * NO, "OFMAP stores");
    chk(n_enc == (t - 1) * g * NO, "encoded bits");
    chk(n_flush == t - 1, "flushes");
    chk(addr_err == 0, "address sequence");
    chk(bank_err == 0, "bank alternation");
    chk(n_busy == t + t * g * (NO + s) + g + (t - 1) * g * NO + n_stall + 2 * (t - 1),
        $sformatf("cycle count %0d (stalls %0d)", n_busy, n_stall));
    @(posedge clk); #1;
    chk(!busy, "idle after done");
    chk(result_bank == 1'((t - 1) % 2), "result bank");
    $display("op t=%0d g=%0d s=%0d: %0d cycles, %0d stalls", t, g, s, n_busy, n_stall);
  endtask

  initial begin
    start = 0; in_valid = 0; n_tiles = 1; n_groups = 1; n_steps = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    chk(!busy, "idle after reset");
    run_op(3, 2, 9);
    run_op(1, 1, 5);
    run_op(4, 1, 0);
    run_op(2, 3, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
