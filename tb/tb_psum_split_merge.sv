// tb_psum_split_merge: exhaustive test of the psum split and merge pair.
//
// For all 512 extended psum values: the stored byte must be the sign and the
// seven low bits, the compressed bit must equal bit 7 of the integer absolute
// value, and merging the two must give the value back.
module tb_psum_split_merge;
  import cnn_pkg::*;
  xpsum_t p, p_back;
  byte_t  stored;
  logic   abs_msb;
  int checks = 0, failures = 0;

  psum_split u_split (.p, .stored, .abs_msb);
  psum_merge u_merge (.stored, .abs_msb, .p(p_back));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ones = 0;
    for (int v = -256; v < 256; v++) begin
      int mag;
      logic [8:0] bits;
      p = xpsum_t'(v);
      #1;
      bits = 9'(v);
      mag  = (v < 0) ? -v : v;
      checks++;
      if (stored !== {bits[8], bits[6:0]}) begin failures++; $display("v=%0d stored=%h", v, stored); end
      checks++;
      if (abs_msb !== mag[7]) begin failures++; $display("v=%0d abs_msb=%0b", v, abs_msb); end
      checks++;
      if (int'(p_back) != v) begin failures++; $display("v=%0d merged=%0d", v, p_back); end
      ones += int'(abs_msb);
    end
    // bit 7 of |v| is set for |v| in 128..255: 128 positive and 128 negative values
    checks++; if (ones != 256) begin failures++; $display("ones=%0d", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
