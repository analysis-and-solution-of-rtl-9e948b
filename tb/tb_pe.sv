// tb_pe: self-checking test of a processing element (8 MACs).
//
// Repeats: load biases into all MACs, run a random number of steps with one
// shared ifmap value and eight filter values (random idle cycles), then
// check every MAC's write-back outputs in both modes: the extended psum
// split into {sign, 7 LSBs} and |psum| bit 7, and the 8-bit OFMAP byte,
// plus the clip/round flags. Then reload random psums into single MACs
// (one-hot mask) and check that only the selected MAC changed.
// Expected values come from an integer/real model in the testbench.
module tb_pe;
  import cnn_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  load_e   ld;
  logic [N-1:0] ld_mask;
  byte_t   bias [N];
  xpsum_t  ld_psum;
  shift_t  shift;
  logic    en, final_q;
  ifmap_t  a;
  weight_t w [N];
  byte_t   out_byte [N];
  logic    abs_msb [N], sat [N], rnd [N];
  int checks = 0, failures = 0;

  pe #(.N_MAC(N)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint model [N];

  function automatic longint wrap20(longint v);
    longint m = v & ((64'sd1 << 20) - 1);
    return (m >= (64'sd1 << 19)) ? m - (64'sd1 << 20) : m;
  endfunction

  function automatic int extract(longint acc, int s, int lo, int hi, output bit c, output bit r);
    real q = $floor(real'(acc) / real'(64'sd1 << s) + 0.5);
    r = (acc % (64'sd1 << s)) != 0;
    c = 1;
    if (q > real'(hi)) return hi;
    if (q < real'(lo)) return lo;
    c = 0;
    return int'(q);
  endfunction

  task automatic check_outputs();
    for (int fq = 0; fq < 2; fq++) begin
      final_q = fq[0];
      #1;
      for (int m = 0; m < N; m++) begin
        bit c, r;
        int v;
        logic [8:0] vb;
        int mag;
        if (fq == 0) v = extract(model[m], int'(shift), -256, 255, c, r);
        else         v = extract(model[m], int'(shift) + 1, -128, 127, c, r);
        vb  = 9'(v);
        mag = (v < 0) ? -v : v;
        checks++;
        if (fq == 0) begin
          if (out_byte[m] != {vb[8], vb[6:0]} || abs_msb[m] != mag[7] || sat[m] != c || rnd[m] != r) begin
            failures++;
            $display("psum mac %0d acc=%0d: byte=%h msb=%0b exp v=%0d", m, model[m], out_byte[m], abs_msb[m], v);
          end
        end else begin
          if (out_byte[m] != vb[7:0] || sat[m] != c || rnd[m] != r) begin
            failures++;
            $display("ofmap mac %0d acc=%0d: byte=%h exp %0d", m, model[m], out_byte[m], v);
          end
        end
      end
    end
    final_q = 0;
  endtask

  initial begin
    ld = LD_NONE; ld_mask = '0; ld_psum = '0; shift = 4'd6; en = 0; final_q = 0; a = '0;
    foreach (w[m]) w[m] = '0;
    foreach (bias[m]) bias[m] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      shift = shift_t'($urandom_range(2, 9));
      foreach (bias[m]) begin
        bias[m] = byte_t'($urandom);
        model[m] = longint'(signed'(bias[m])) <<< (int'(shift) + 1);
      end
      ld = LD_BIAS; ld_mask = '1;
      @(posedge clk); #1;
      ld = LD_NONE; ld_mask = '0;
      for (int k = 0; k < $urandom_range(1, 60); k++) begin
        en = $urandom_range(0, 4) != 0;
        a = ifmap_t'($urandom);
        foreach (w[m]) begin
          w[m] = weight_t'($urandom);
          if (en) model[m] = wrap20(model[m] + longint'(a) * longint'(w[m]));
        end
        @(posedge clk); #1;
      end
      en = 0;
      check_outputs();
      // reload single MACs
      for (int k = 0; k < 3; k++) begin
        automatic int sel = $urandom_range(0, N - 1);
        ld = LD_PSUM; ld_mask = N'(1) << sel; ld_psum = xpsum_t'($urandom);
        model[sel] = longint'(ld_psum) <<< int'(shift);
        @(posedge clk); #1;
        ld = LD_NONE; ld_mask = '0;
      end
      check_outputs();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
