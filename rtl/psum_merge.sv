// psum_merge: rebuilds an extended psum from its stored byte and decoded bit.
//
// Inverse of psum_split. The stored byte gives the sign s and the seven low
// bits L; the decoded bit m is bit 7 of the absolute value. For a positive
// value bit 7 is m itself. For a negative value |p| = ~p + 1, and the +1
// only reaches bit 7 when L is all zeros, so bit 7 of p is m when L == 0 and
// ~m otherwise. The mapping is exact for every 9-bit value.
//
// The method only says that decoding mirrors encoding; the rule above is
// derived here.
//
// Interface: purely combinational.
module psum_merge
  import cnn_pkg::*;
(
  input  byte_t  stored,
  input  logic   abs_msb,
  output xpsum_t p
);
  logic s, b7;
  logic [BW_P-3:0] low;
  always_comb begin
    s   = stored[BW_O-1];
    low = stored[BW_O-2:0];
    if (!s)              b7 = abs_msb;
    else if (low == '0)  b7 = abs_msb;
    else                 b7 = ~abs_msb;
    p = {s, b7, low};
  end
endmodule
