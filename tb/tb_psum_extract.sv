// tb_psum_extract: self-checking test of psum/OFMAP extraction.
//
// Random accumulator values (with extra weight on values near the clipping
// limits and on exact halves) at every shift 0..11, in both modes. The
// expected result is computed in real arithmetic: floor(acc/2^s + 0.5),
// clipped to [-256, 255] for the extended psum and [-128, 127] for the
// OFMAP (whose shift is one larger). The sat and rnd flags are checked too.
module tb_psum_extract;
  import cnn_pkg::*;
  acc_t   acc;
  shift_t shift;
  logic   final_q;
  xpsum_t q;
  logic   sat, rnd;
  int checks = 0, failures = 0;
  int n_sat = 0, n_rnd = 0;

  psum_extract dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int s, e_q, lo, hi, raw;
      real r;
      logic e_sat, e_rnd;
      shift   = shift_t'($urandom_range(0, 11));
      final_q = 1'($urandom_range(0, 1));
      s = int'(shift) + int'(final_q);
      case ($urandom_range(0, 3))
        0: raw = int'($urandom_range(0, (1 << 20) - 1)) - (1 << 19);
        1: raw = (int'($urandom_range(0, 511)) - 256) * (1 << s) + int'($urandom_range(0, 3)) - 2;
        2: raw = (int'($urandom_range(0, 511)) - 256) * (1 << s) + ((s > 0) ? (1 << (s - 1)) : 0);
        default: raw = int'($urandom_range(0, 4000)) - 2000;
      endcase
      if (raw > (1 << 19) - 1) raw = (1 << 19) - 1;
      if (raw < -(1 << 19))    raw = -(1 << 19);
      acc = acc_t'(raw);
      #1;
      r   = $floor(real'(raw) / real'(1 << s) + 0.5);
      hi  = final_q ? 127 : 255;
      lo  = final_q ? -128 : -256;
      e_sat = 0;
      if (r > real'(hi)) begin e_q = hi; e_sat = 1; end
      else if (r < real'(lo)) begin e_q = lo; e_sat = 1; end
      else e_q = int'(r);
      e_rnd = (raw % (1 << s)) != 0;
      checks++;
      if (int'(q) != e_q || sat != e_sat || rnd != e_rnd) begin
        failures++;
        if (failures < 10)
          $display("acc=%0d s=%0d final=%0d: got q=%0d sat=%0b rnd=%0b exp %0d %0b %0b",
                   raw, s, final_q, q, sat, rnd, e_q, e_sat, e_rnd);
      end
      n_sat += int'(sat); n_rnd += int'(rnd);
    end
    checks++; if (n_sat == 0 || n_rnd == 0) failures++;
    $display("saturations=%0d roundings=%0d", n_sat, n_rnd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
