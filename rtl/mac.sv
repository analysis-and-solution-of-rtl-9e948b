// mac: one multiply-and-accumulate unit with a loadable 20-bit accumulator.
//
// Each step multiplies a signed 8-bit ifmap value by a signed 8-bit filter
// value into a 16-bit product and adds it to the 20-bit accumulator, as in
// the accelerator's numeric model (8-bit operands, 16-bit products, 20-bit
// accumulation). At the start of a channel tile the accumulator is loaded
// either with the bias (first tile) or with the partial sum saved by the
// previous tile. Both arrive in a narrower fixed-point format and are moved
// onto the accumulator's binary point by an arithmetic left shift:
//   psum  (9 bits, FL_acc - shift fractional bits):  acc = psum << shift
//   bias  (8 bits, one fractional bit fewer):         acc = bias << (shift+1)
// Accumulation wraps on overflow; the accumulator is sized so that it does
// not overflow for the layers it is meant for. Loading takes priority over
// accumulating in the same cycle.
//
// The widths follow the accelerator's numeric model; wrap-around on
// overflow and alignment by shifting are this implementation's choices.
//
// Timing: one product per cycle while en is high; the result is visible on
// acc the cycle after. Reset (asynchronous, active low) clears acc.
module mac
  import cnn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  load_e   ld,        // LD_BIAS / LD_PSUM load, LD_NONE keeps
  input  byte_t   ld_bias,   // bias, OFMAP format
  input  xpsum_t  ld_psum,   // extended psum
  input  shift_t  shift,     // fractional length of acc minus that of psum
  input  logic    en,        // accumulate a*w this cycle
  input  ifmap_t  a,
  input  weight_t w,
  output acc_t    acc
);
  logic signed [BW_MUL-1:0] prod;
  acc_t bias_al, psum_al;

  assign prod    = a * w;
  assign bias_al = acc_t'(signed'(ld_bias)) <<< (shift + 1'b1);
  assign psum_al = acc_t'(ld_psum) <<< shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              acc <= '0;
    else if (ld == LD_BIAS)  acc <= bias_al;
    else if (ld == LD_PSUM)  acc <= psum_al;
    else if (en)             acc <= acc + acc_t'(prod);
  end
endmodule
