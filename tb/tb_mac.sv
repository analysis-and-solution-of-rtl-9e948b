// tb_mac: self-checking test of the MAC unit.
//
// Runs many random sequences: load a bias or a psum at a random alignment
// shift, accumulate a random number of random signed products (with random
// idle cycles), and compare the accumulator after every cycle with an
// integer model (20-bit wrap-around). A watchdog ends the run if it hangs.
module tb_mac;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  load_e   ld;
  byte_t   ld_bias;
  xpsum_t  ld_psum;
  shift_t  shift;
  logic    en;
  ifmap_t  a;
  weight_t w;
  acc_t    acc;
  int checks = 0, failures = 0;

  mac dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint model;
  function automatic longint wrap20(longint v);
    longint m = v & ((64'sd1 << 20) - 1);
    return (m >= (64'sd1 << 19)) ? m - (64'sd1 << 20) : m;
  endfunction

  initial begin
    ld = LD_NONE; ld_bias = '0; ld_psum = '0; shift = '0; en = 0; a = '0; w = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    checks++; if (acc !== '0) begin failures++; $display("reset value %0d", acc); end
    for (int seq = 0; seq < 400; seq++) begin
      shift = shift_t'($urandom_range(0, 11));
      if ($urandom_range(0, 1) != 0) begin
        ld = LD_BIAS; ld_bias = byte_t'($urandom);
        model = longint'(signed'(ld_bias)) * (64'sd1 << (int'(shift) + 1));
      end else begin
        ld = LD_PSUM; ld_psum = xpsum_t'($urandom);
        model = longint'(ld_psum) * (64'sd1 << int'(shift));
      end
      model = wrap20(model);
      a = ifmap_t'($urandom); w = weight_t'($urandom); en = 1;  // load wins over en
      @(posedge clk); #1;
      ld = LD_NONE;
      checks++; if (longint'(acc) != model) begin failures++; $display("load: got %0d exp %0d", acc, model); end
      for (int k = 0; k < $urandom_range(1, 40); k++) begin
        en = ($urandom_range(0, 3) != 0);
        a = ifmap_t'($urandom); w = weight_t'($urandom);
        if (en) model = wrap20(model + longint'(a) * longint'(w));
        @(posedge clk); #1;
        checks++; if (longint'(acc) != model) begin failures++; $display("acc: got %0d exp %0d", acc, model); end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
