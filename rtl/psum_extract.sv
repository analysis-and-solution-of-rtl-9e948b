// psum_extract: extraction of an accumulator value to a narrow fixed-point word.
//
// Between channel tiles the 20-bit accumulator is reduced to the extended
// partial sum: 8 bits plus one extra fractional bit, 9 bits in all. After the
// last tile it is reduced to the 8-bit output feature map (OFMAP), which has
// one fractional bit fewer. The reduction drops `shift` (or `shift+1` for
// the OFMAP) low bits with round-half-up (add half an output LSB, then shift
// arithmetically) and saturates to the output range; saturation is what
// causes an "exceeding error", dropped non-zero bits a "rounding error".
// Both events are flagged so that they can be counted.
//
// The 9-bit extended psum and the clipping follow the method; the
// round-half-up rule is this implementation's choice.
//
// Interface: purely combinational. q is the 9-bit result; in OFMAP mode it
// lies in the 8-bit range and is sign-extended to 9 bits.
module psum_extract
  import cnn_pkg::*;
(
  input  acc_t   acc,
  input  shift_t shift,   // FL_acc minus FL of the extended psum
  input  logic   final_q, // 1: extract the 8-bit OFMAP, 0: the 9-bit psum
  output xpsum_t q,
  output logic   sat,     // result was clipped (exceeding error)
  output logic   rnd      // non-zero bits were dropped (rounding error)
);
  localparam int signed P_MAX = (1 <<< (BW_P - 1)) - 1;   //  255
  localparam int signed P_MIN = -(1 <<< (BW_P - 1));      // -256
  localparam int signed O_MAX = (1 <<< (BW_O - 1)) - 1;   //  127
  localparam int signed O_MIN = -(1 <<< (BW_O - 1));      // -128

  logic [SHIFT_W:0]         sh;
  logic signed [BW_ACC:0]   wide, half, rounded;
  logic [BW_ACC-1:0]        mask;
  int signed                hi, lo;

  always_comb begin
    sh   = {1'b0, shift} + {{SHIFT_W{1'b0}}, final_q};
    wide = (BW_ACC+1)'(acc);
    half = (sh == 0) ? '0 : ((BW_ACC+1)'(1) <<< (sh - 1'b1));
    rounded = (wide + half) >>> sh;
    mask = (BW_ACC'(1) << sh) - 1'b1;
    rnd  = (acc & mask) != '0;
    hi   = final_q ? O_MAX : P_MAX;
    lo   = final_q ? O_MIN : P_MIN;
    sat  = 1'b0;
    if (int'(rounded) > hi) begin
      q   = xpsum_t'(hi);
      sat = 1'b1;
    end else if (int'(rounded) < lo) begin
      q   = xpsum_t'(lo);
      sat = 1'b1;
    end else begin
      q   = xpsum_t'(rounded);
    end
  end
endmodule
