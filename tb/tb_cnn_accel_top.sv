// tb_cnn_accel_top: end-to-end test of the accelerator at its default size.
//
// Each operation writes random ifmap/filter operand sets (mostly small
// values with occasional large ones, so that some psums clip and some have
// bit 7 of their magnitude set) into the double-buffered operand buffer,
// chunk by chunk with random gaps, waits for done and reads back every
// OFMAP byte. A model in the
// testbench repeats the arithmetic: bias aligned into a 20-bit accumulator,
// products accumulated per channel tile, the psum rounded and clipped to
// 9 bits between tiles and reloaded, the last tile rounded and clipped to
// the 8-bit OFMAP. Also checked: the number of code words the run-length
// encoder left for the last reloaded tile (runs of the |psum| bit-7 plane,
// at most 2^15 bits each), the bank holding the result, and the number of
// cycles from start to done: per tile 1, per tile and group n_steps + stalls
// + 48 store cycles, 1 bias cycle per group in the first tile, 48 reload
// cycles per group in the others, and 2 flush cycles per tile but the last.
// The model also computes, for comparison only, the OFMAP an untiled
// computation would give and the one plain 8-bit psums would give; the
// operation with many tiles checks that keeping the extra psum bit brings
// the result closer to the untiled one.
// Mechanisms counted (each must occur): operand stalls (the next chunk not
// yet written), a full operand buffer holding the writer off, clipped psums,
// rounded psums, psum reloads, compressed bit-7 ones, compression below one
// word per bit, results in both banks.
module tb_cnn_accel_top;
  import cnn_pkg::*;
  localparam int NP = 6, NM = 8, NO = NP * NM;
  localparam int MAXT = 16, MAXG = 85, MAXS = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, fill_valid, fill_ready, fill_last, rd_bank, result_bank, rle_overflow;
  logic sat_event, rnd_event;
  logic [15:0] n_tiles;
  logic [7:0] n_groups;
  logic [15:0] n_steps;
  shift_t psum_shift;
  byte_t bias [NM];
  ifmap_t fill_ifmap [NP];
  weight_t fill_weight [NM];
  logic [11:0] rd_addr;
  byte_t rd_data;
  logic [8:0] rle_words [2];
  int checks = 0, failures = 0;

  cnn_accel_top dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // operand store, indexed by the stream position (tile, group, step)
  byte_t ifm [MAXT][MAXG][MAXS][NP];
  byte_t wts [MAXT][MAXG][MAXS][NM];
  int    ofmap_exp [MAXG][NO];

  // mechanism counters
  int n_stall = 0, n_sat = 0, n_rnd = 0, n_reload_ops = 0, n_msb_ones = 0;
  int n_compressed = 0, n_bank [2] = '{0, 0}, n_full = 0;

  function automatic longint wrap20(longint v);
    longint m = v & ((64'sd1 << 20) - 1);
    return (m >= (64'sd1 << 19)) ? m - (64'sd1 << 20) : m;
  endfunction

  function automatic int extract(longint acc, int s, int lo, int hi);
    real q = $floor(real'(acc) / real'(64'sd1 << s) + 0.5);
    if (q > real'(hi)) return hi;
    if (q < real'(lo)) return lo;
    return int'(q);
  endfunction

  function automatic byte_t rnd_operand();
    if ($urandom_range(0, 9) == 0) return byte_t'($urandom);
    return byte_t'(int'($urandom_range(0, 16)) - 8);
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // operand buffer filler: writes the chunks in stream order with random gaps
  int  pos_t, pos_g, pos_s, stream_left;
  bit  streaming = 0;
  always @(negedge clk) begin
    if (streaming && stream_left > 0) begin
      fill_valid = $urandom_range(0, 4) != 0;
      fill_last  = pos_s == int'(n_steps) - 1;
      for (int p = 0; p < NP; p++) fill_ifmap[p]  = ifmap_t'(ifm[pos_t][pos_g][pos_s][p]);
      for (int m = 0; m < NM; m++) fill_weight[m] = weight_t'(wts[pos_t][pos_g][pos_s][m]);
    end else begin
      fill_valid = 0;
      fill_last  = 0;
    end
  end
  always @(posedge clk) begin
    if (fill_valid && fill_ready) begin
      stream_left--;
      if (pos_s == int'(n_steps) - 1) begin
        pos_s = 0;
        if (pos_g == int'(n_groups) - 1) begin pos_g = 0; pos_t++; end
        else pos_g++;
      end else pos_s++;
    end
    if (busy && dut.in_ready && !dut.in_valid) n_stall++;
    if (fill_valid && !fill_ready) n_full++;
    if (sat_event) n_sat++;
    if (rnd_event) n_rnd++;
  end

  task automatic run_op(int t, int g, int s, int sh, bit compare_err);
    int  cycles = 0, exp_words = 0, bits_last = 0, stalls0;
    real err_ext = 0.0, err_base = 0.0;
    bit  prev_bit = 0;
    int  run_len = 0;
    // data
    for (int m = 0; m < NM; m++) bias[m] = byte_t'(int'($urandom_range(0, 40)) - 20);
    for (int ti = 0; ti < t; ti++)
      for (int gi = 0; gi < g; gi++)
        for (int si = 0; si < s; si++) begin
          for (int p = 0; p < NP; p++) ifm[ti][gi][si][p] = rnd_operand();
          for (int m = 0; m < NM; m++) wts[ti][gi][si][m] = rnd_operand();
        end
    // model
    for (int gi = 0; gi < g; gi++)
      for (int p = 0; p < NP; p++)
        for (int m = 0; m < NM; m++) begin
          longint acc, acc_b, full;
          int v, ideal, base;
          acc  = wrap20(longint'(signed'(bias[m])) <<< (sh + 1));
          acc_b = acc;
          full = acc;
          for (int ti = 0; ti < t; ti++) begin
            longint sum = 0;
            for (int si = 0; si < s; si++)
              sum += longint'(signed'(ifm[ti][gi][si][p])) * longint'(signed'(wts[ti][gi][si][m]));
            acc   = wrap20(acc + sum);
            acc_b = wrap20(acc_b + sum);
            full  = full + sum;
            if (ti < t - 1) begin
              logic [8:0] vb;
              int mag;
              v   = extract(acc, sh, -256, 255);
              acc = wrap20(longint'(v) <<< sh);
              mag = (v < 0) ? -v : v;
              n_msb_ones += int'(mag[7]);
              if (ti == t - 2) begin
                // runs of the bit-7 plane of the last reloaded tile
                if (run_len == 0 || mag[7] != prev_bit || run_len == (1 << 15)) begin
                  exp_words++; run_len = 0;
                end
                prev_bit = mag[7]; run_len++; bits_last++;
              end
              base  = extract(acc_b, sh + 1, -128, 127);
              acc_b = wrap20(longint'(base) <<< (sh + 1));
            end
          end
          ofmap_exp[gi][p * NM + m] = extract(acc, sh + 1, -128, 127);
          ideal = extract(full, sh + 1, -128, 127);
          base  = extract(acc_b, sh + 1, -128, 127);
          err_ext  += real'((ofmap_exp[gi][p * NM + m] - ideal) ** 2);
          err_base += real'((base - ideal) ** 2);
        end
    // run
    n_tiles = 16'(t); n_groups = 8'(g); n_steps = 16'(s); psum_shift = shift_t'(sh);
    pos_t = 0; pos_g = 0; pos_s = 0; stream_left = t * g * s; streaming = 1;
    stalls0 = n_stall;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      @(negedge clk); cycles++;
      if (cycles > 2000000) break;
    end
    streaming = 0;
    @(negedge clk);
    chk(stream_left == 0, "whole operand stream consumed");
    chk(cycles == t + t * g * (NO + s) + g + (t - 1) * g * NO + (n_stall - stalls0) + 2 * (t - 1),
        $sformatf("cycles from start to done: %0d", cycles));
    chk(result_bank == 1'((t - 1) % 2), "result bank");
    n_bank[result_bank]++;
    chk(!rle_overflow, "no code word overflow");
    if (t > 1) begin
      n_reload_ops++;
      chk(int'(rle_words[(t - 2) % 2]) == exp_words,
          $sformatf("code words %0d, expected %0d", rle_words[(t - 2) % 2], exp_words));
      if (exp_words < bits_last) n_compressed++;
    end
    // read back
    rd_bank = result_bank;
    for (int gi = 0; gi < g; gi++)
      for (int o = 0; o < NO; o++) begin
        rd_addr = 12'(gi * NO + o);
        #1;
        checks++;
        if (int'(signed'(rd_data)) != ofmap_exp[gi][o]) begin
          failures++;
          if (failures < 20) $display("g=%0d out=%0d: got %0d exp %0d", gi, o, signed'(rd_data), ofmap_exp[gi][o]);
        end
      end
    $display("op t=%0d g=%0d s=%0d shift=%0d: %0d cycles, RLE words %0d for %0d bits, mse vs untiled: 9-bit psum %0.3f, 8-bit psum %0.3f",
             t, g, s, sh, cycles, exp_words, bits_last, err_ext / (g * NO), err_base / (g * NO));
    if (compare_err) chk(err_ext < err_base, "extended psum closer to untiled result");
  endtask

  initial begin
    start = 0; fill_valid = 0; fill_last = 0; rd_bank = 0; rd_addr = 0; psum_shift = 4;
    n_tiles = 1; n_groups = 1; n_steps = 1;
    foreach (bias[m]) bias[m] = '0;
    foreach (fill_ifmap[p]) fill_ifmap[p] = '0;
    foreach (fill_weight[m]) fill_weight[m] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_op(1, 1, 4, 4, 0);
    run_op(3, 2, 8, 4, 0);
    run_op(2, 85, 2, 3, 0);       // fills the psum region of both banks
    run_op(16, 4, 4, 5, 1);
    run_op(5, 3, 6, 2, 0);
    $display("operand buffer full (writer held off): %0d cycles", n_full);
    chk(n_full > 0, "operand buffer back-pressure happened");
    $display("mechanisms: stalls=%0d clipped=%0d rounded=%0d reload_ops=%0d msb_ones=%0d compressed_ops=%0d bank0=%0d bank1=%0d",
             n_stall, n_sat, n_rnd, n_reload_ops, n_msb_ones, n_compressed, n_bank[0], n_bank[1]);
    chk(n_stall > 0, "stall happened");
    chk(n_sat > 0, "clipping happened");
    chk(n_rnd > 0, "rounding happened");
    chk(n_reload_ops > 0, "psum reload happened");
    chk(n_msb_ones > 0, "non-zero compressed bit happened");
    chk(n_compressed > 0, "compression happened");
    chk(n_bank[0] > 0 && n_bank[1] > 0, "both banks used for results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
