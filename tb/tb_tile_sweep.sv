// tb_tile_sweep: the same convolution run with more and more channel tiles.
//
// A block of 4 x 48 outputs, each summing 128 products (for instance 128
// input channels of a 1x1 kernel, or 14 channels of a 3x3 kernel plus two
// more steps), is computed with the channel loop split into 1, 2, 4, ...,
// 128 tiles. The operands are small, like the feature maps of a quantized
// network, so most psums are small with a long tail. Every run is checked
// output by output against a bit-exact model of the accelerator. The model
// also computes the untiled result and the result with plain 8-bit psums.
// The testbench prints, for every tile count, the mean squared OFMAP error
// against the untiled result for both psum formats. It checks that keeping
// the extra fractional bit gives a smaller total error over the sweep, and
// that one tile gives no tiling error at all.
module tb_tile_sweep;
  import cnn_pkg::*;
  localparam int NP = 6, NM = 8, NO = NP * NM, G = 4, STEPS = 128, SH = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, fill_valid, fill_ready, fill_last, rd_bank, result_bank, rle_overflow;
  logic sat_event, rnd_event;
  logic [15:0] n_tiles, n_steps;
  logic [7:0] n_groups;
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte_t ifm [G][STEPS][NP];
  byte_t wts [G][STEPS][NM];

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

  // filler: chunk (tile t, group g) holds steps t*n_steps .. t*n_steps+n_steps-1
  int  pos_t, pos_g, pos_s, left;
  bit  streaming = 0;
  always @(negedge clk) begin
    if (streaming && left > 0) begin
      int st;
      st = pos_t * int'(n_steps) + pos_s;
      fill_valid = 1;
      fill_last  = pos_s == int'(n_steps) - 1;
      for (int p = 0; p < NP; p++) fill_ifmap[p]  = ifmap_t'(ifm[pos_g][st][p]);
      for (int m = 0; m < NM; m++) fill_weight[m] = weight_t'(wts[pos_g][st][m]);
    end else begin
      fill_valid = 0; fill_last = 0;
    end
  end
  always @(posedge clk) begin
    if (fill_valid && fill_ready) begin
      left--;
      if (pos_s == int'(n_steps) - 1) begin
        pos_s = 0;
        if (pos_g == G - 1) begin pos_g = 0; pos_t++; end
        else pos_g++;
      end else pos_s++;
    end
  end

  real tot_ext = 0.0, tot_base = 0.0;

  task automatic run_tiles(int t);
    int s = STEPS / t, cycles = 0, bad = 0;
    real e_ext = 0.0, e_base = 0.0;
    n_tiles = 16'(t); n_steps = 16'(s); n_groups = 8'(G); psum_shift = shift_t'(SH);
    pos_t = 0; pos_g = 0; pos_s = 0; left = t * G * s; streaming = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done && cycles < 1000000) begin @(negedge clk); cycles++; end
    streaming = 0;
    @(negedge clk);
    rd_bank = result_bank;
    for (int g = 0; g < G; g++)
      for (int p = 0; p < NP; p++)
        for (int m = 0; m < NM; m++) begin
          longint acc, acc_b, full;
          int v, ideal, base;
          acc = wrap20(longint'(signed'(bias[m])) <<< (SH + 1));
          acc_b = acc; full = acc;
          for (int ti = 0; ti < t; ti++) begin
            longint sum = 0;
            for (int si = ti * s; si < (ti + 1) * s; si++)
              sum += longint'(signed'(ifm[g][si][p])) * longint'(signed'(wts[g][si][m]));
            acc = wrap20(acc + sum); acc_b = wrap20(acc_b + sum); full += sum;
            if (ti < t - 1) begin
              v = extract(acc, SH, -256, 255);       acc   = wrap20(longint'(v) <<< SH);
              base = extract(acc_b, SH + 1, -128, 127); acc_b = wrap20(longint'(base) <<< (SH + 1));
            end
          end
          v     = extract(acc, SH + 1, -128, 127);
          ideal = extract(full, SH + 1, -128, 127);
          base  = extract(acc_b, SH + 1, -128, 127);
          rd_addr = 12'(g * NO + p * NM + m);
          #1;
          checks++;
          if (int'(signed'(rd_data)) != v) begin
            bad++; failures++;
            if (failures < 10) $display("t=%0d g=%0d p=%0d m=%0d: got %0d exp %0d", t, g, p, m, signed'(rd_data), v);
          end
          e_ext  += real'((v - ideal) ** 2);
          e_base += real'((base - ideal) ** 2);
        end
    if (t == 1) begin
      checks++; if (e_ext != 0.0) begin failures++; $display("one tile must equal the untiled result"); end
    end
    checks++; if (rle_overflow) begin failures++; $display("code word overflow"); end
    tot_ext += e_ext; tot_base += e_base;
    $display("tiles=%4d steps/tile=%4d cycles=%7d  mse vs untiled: 9-bit psum %7.4f  8-bit psum %7.4f",
             t, s, cycles, e_ext / (G * NO), e_base / (G * NO));
  endtask

  initial begin
    start = 0; fill_valid = 0; fill_last = 0; rd_bank = 0; rd_addr = 0;
    n_tiles = 1; n_steps = 1; n_groups = 1; psum_shift = shift_t'(SH);
    foreach (fill_ifmap[p]) fill_ifmap[p] = '0;
    foreach (fill_weight[m]) fill_weight[m] = '0;
    foreach (bias[m]) bias[m] = byte_t'(int'($urandom_range(0, 16)) - 8);
    for (int g = 0; g < G; g++)
      for (int st = 0; st < STEPS; st++) begin
        for (int p = 0; p < NP; p++) ifm[g][st][p] = byte_t'($urandom_range(0, 12));          // post-ReLU-like
        for (int m = 0; m < NM; m++) wts[g][st][m] = byte_t'(int'($urandom_range(0, 24)) - 12);
      end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 1; t <= STEPS; t *= 2) run_tiles(t);
    $display("sum over the sweep: 9-bit psum %0.2f, 8-bit psum %0.2f", tot_ext, tot_base);
    checks++; if (!(tot_ext < tot_base)) begin failures++; $display("extended psum not better"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
