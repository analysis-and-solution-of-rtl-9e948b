// cnn_pkg: widths and types shared by the channel-tiling accelerator.
//
// The accelerator keeps feature maps and filters in 8-bit dynamic fixed
// point, multiplies them into 16-bit products and accumulates into 20-bit
// accumulators, as the numeric model of the design prescribes. A partial
// sum (psum) that leaves the accumulator between channel tiles is kept with
// one extra fractional bit (9 bits in all); only 8 of those bits are stored
// plainly, the ninth is compressed by a bit-level run-length code.
// The widths are fixed by the design; only sizes of the array and of the
// buffers are module parameters.
package cnn_pkg;
  localparam int unsigned BW_I    = 8;          // ifmap width
  localparam int unsigned BW_F    = 8;          // filter width
  localparam int unsigned BW_MUL  = BW_I + BW_F; // product width (16)
  localparam int unsigned BW_ACC  = 20;         // accumulator width
  localparam int unsigned BW_O    = 8;          // OFMAP / stored psum width
  localparam int unsigned EXT_FP  = 1;          // extra fractional bits of a psum
  localparam int unsigned BW_P    = BW_O + EXT_FP; // extended psum width (9)
  localparam int unsigned SHIFT_W = 4;          // width of the alignment shift

  typedef logic signed [BW_I-1:0]   ifmap_t;
  typedef logic signed [BW_F-1:0]   weight_t;
  typedef logic signed [BW_ACC-1:0] acc_t;
  typedef logic signed [BW_P-1:0]   xpsum_t;   // extended psum
  typedef logic        [BW_O-1:0]   byte_t;    // stored psum / OFMAP byte
  typedef logic        [SHIFT_W-1:0] shift_t;

  // What a MAC loads into its accumulator at the start of a tile.
  typedef enum logic [1:0] {
    LD_NONE  = 2'd0,
    LD_BIAS  = 2'd1,   // 8-bit bias in OFMAP format
    LD_PSUM  = 2'd2    // 9-bit extended psum reloaded from the buffer
  } load_e;
endpackage
