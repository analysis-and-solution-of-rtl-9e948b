// psum_split: splits an extended psum into a stored byte and one bit to compress.
//
// The extended psum has 9 bits: sign (bit 8), the most significant magnitude
// bit (bit 7) and seven lower bits, the lowest of which is the extra
// fractional bit. The byte written to the output buffer is the sign followed
// by the seven low bits, so it keeps the layout of an ordinary 8-bit word.
// Bit 7 is cut out. Because most partial sums are small, bit 7 of a two's
// complement value mostly just repeats the sign and is near 50% ones; bit 7
// of the absolute value is almost always zero, which is what makes the
// bit-level run-length code effective. So the bit handed to the encoder is
// bit 7 of |psum| (computed 10 bits wide, so -256 has a valid magnitude).
//
// The stored byte and the use of the absolute value follow the method;
// taking bit 7 of the full 10-bit magnitude is this implementation's
// reading of it.
//
// Interface: purely combinational.
module psum_split
  import cnn_pkg::*;
(
  input  xpsum_t p,
  output byte_t  stored,   // {sign, seven LSBs}
  output logic   abs_msb   // bit BW_P-2 of |p|
);
  logic [BW_P:0] mag;
  always_comb begin
    mag     = p[BW_P-1] ? (BW_P+1)'(-signed'({p[BW_P-1], p})) : (BW_P+1)'({1'b0, p});
    stored  = {p[BW_P-1], p[BW_P-3:0]};
    abs_msb = mag[BW_P-2];
  end
endmodule
