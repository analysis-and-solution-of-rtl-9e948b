// cnn_accel_top: CNN accelerator with channel-loop tiling and compressed
// extended partial sums.
//
// When the input-channel loop of a convolution is split into tiles, the
// partial sum (psum) of every output has to leave the wide accumulator after
// each tile and come back before the next. Cutting it to the 8-bit output
// width each time adds rounding errors (and clipping, "exceeding errors")
// that compound over the tiles. This accelerator keeps one extra fractional
// bit in every saved psum (9 bits) but stores only 8 of them plainly: the
// sign and the seven low bits. The bit under the sign is replaced by the
// same bit of the psum's absolute value, which is almost always zero, and
// that bit plane is stored run-length encoded next to the psums.
//
// Structure: a controller, N_PE processing elements of N_MAC MACs each
// (6 x 8), per-MAC extraction/splitting inside the PEs, one bit-level
// run-length encoder and one decoder, a double-buffered output buffer and a
// double-buffered operand (ifmap/filter) buffer.
// The 6 x 8 array, the 8/16/20-bit widths, the one extra fractional psum
// bit, the {sign, seven LSBs} storage, the absolute-value MSB and its
// bit-level run-length code follow the method; the dataflow, the psum round
// trip through the two output buffer banks instead of external memory, the
// serial write-back and the operand buffer's organization are this
// implementation's own choices.
// Tile t writes its psums and code words to bank t%2 and reloads tile t-1's
// from the other bank; the last tile writes the 8-bit OFMAP.
//
// Data layout of one operation: n_groups groups of N_PE*N_MAC outputs; in a
// group, PE p computes output position p and MAC m output channel m; the
// output (g, p, m) sits at byte address g*N_PE*N_MAC + p*N_MAC + m of
// result_bank. Operands are written into the operand buffer as sets (per
// MAC step one ifmap byte per PE and one filter byte per output channel),
// one chunk of n_steps sets per (channel tile, group), in the order: for
// each channel tile, for each group; fill_last marks a chunk's last set.
// While one chunk is computed the next can be written (double buffering);
// a chunk that has not arrived stalls the MACs. n_steps must be 1..OPB_DEPTH.
// psum_shift is FL(accumulator) - FL(extended psum); the bias and OFMAP have
// one fractional bit fewer than the extended psum.
// Timing per tile and group: load (1 cycle for bias, N_PE*N_MAC for psums),
// n_steps compute cycles plus stalls, N_PE*N_MAC store cycles; one set-up
// cycle per tile and two flush cycles per tile but the last.
// Reset: asynchronous, active low.
module cnn_accel_top
  import cnn_pkg::*;
#(
  parameter int unsigned N_PE       = 6,
  parameter int unsigned N_MAC      = 8,
  parameter int unsigned PSUM_DEPTH = 4096,
  parameter int unsigned RLE_DEPTH  = 256,
  parameter int unsigned LEN_W      = 16,
  parameter int unsigned OPB_DEPTH  = 1024,
  localparam int unsigned AW  = $clog2(PSUM_DEPTH),
  localparam int unsigned CAW = $clog2(RLE_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // operation
  input  logic          start,
  input  logic [15:0]   n_tiles,
  input  logic [15:0]   n_steps,
  input  logic [7:0]    n_groups,
  input  shift_t        psum_shift,
  input  byte_t         bias   [N_MAC],
  output logic          busy,
  output logic          done,
  // operand fill port of the double-buffered ifmap/filter buffer
  input  logic          fill_valid,
  output logic          fill_ready,
  input  logic          fill_last,
  input  ifmap_t        fill_ifmap  [N_PE],
  input  weight_t       fill_weight [N_MAC],
  // OFMAP read-out
  input  logic          rd_bank,
  input  logic [AW-1:0] rd_addr,
  output byte_t         rd_data,
  output logic          result_bank,
  // status
  output logic          rle_overflow,
  output logic [CAW:0]  rle_words [2],     // code words held per bank
  output logic          sat_event,         // an extraction clipped this cycle
  output logic          rnd_event          // an extraction rounded this cycle
);
  localparam int unsigned PW = (N_PE  > 1) ? $clog2(N_PE)  : 1;
  localparam int unsigned MW = (N_MAC > 1) ? $clog2(N_MAC) : 1;

  load_e          ld;
  logic           ld_all, mac_en, final_q, buf_wr_en, bank_w;
  logic [PW-1:0]  sel_pe;
  logic [MW-1:0]  sel_mac;
  logic [AW-1:0]  buf_addr;
  logic           enc_valid, enc_flush, dec_ready, dec_clear;
  logic           cw_rd_start, cw_wr_clear, ovf_clear;

  // ------------------------------------------- ifmap / filter buffer
  logic    in_valid, in_ready;
  ifmap_t  ifmap  [N_PE];
  weight_t weight [N_MAC];

  operand_buffer #(.N_PE(N_PE), .N_MAC(N_MAC), .DEPTH(OPB_DEPTH)) u_opbuf (
    .clk, .rst_n, .fill_valid, .fill_ready, .fill_last, .fill_ifmap, .fill_weight,
    .out_valid(in_valid), .out_ready(in_ready), .out_ifmap(ifmap), .out_weight(weight)
  );

  controller #(.N_PE(N_PE), .N_MAC(N_MAC), .AW(AW)) u_ctrl (
    .clk, .rst_n, .start, .n_tiles, .n_steps, .n_groups,
    .in_valid, .in_ready, .mac_en, .ld, .ld_all, .sel_pe, .sel_mac,
    .final_q, .buf_wr_en, .buf_addr, .bank_w, .enc_valid, .enc_flush,
    .dec_ready, .dec_clear, .cw_rd_start, .cw_wr_clear, .ovf_clear,
    .busy, .done, .result_bank
  );

  // ---------------------------------------------------------------- PEs
  byte_t  pe_byte [N_PE][N_MAC];
  logic   pe_msb  [N_PE][N_MAC];
  logic   pe_sat  [N_PE][N_MAC];
  logic   pe_rnd  [N_PE][N_MAC];
  xpsum_t reload_psum;

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    logic [N_MAC-1:0] mask;
    always_comb begin
      for (int m = 0; m < N_MAC; m++)
        mask[m] = ld_all || (PW'(p) == sel_pe && MW'(m) == sel_mac);
    end
    pe #(.N_MAC(N_MAC)) u_pe (
      .clk, .rst_n, .ld, .ld_mask(mask), .bias, .ld_psum(reload_psum),
      .shift(psum_shift), .en(mac_en), .a(ifmap[p]), .w(weight),
      .final_q, .out_byte(pe_byte[p]), .abs_msb(pe_msb[p]),
      .sat(pe_sat[p]), .rnd(pe_rnd[p])
    );
  end

  byte_t sel_byte;
  logic  sel_msb;
  assign sel_byte  = pe_byte[sel_pe][sel_mac];
  assign sel_msb   = pe_msb[sel_pe][sel_mac];
  assign sat_event = buf_wr_en && pe_sat[sel_pe][sel_mac];
  assign rnd_event = buf_wr_en && pe_rnd[sel_pe][sel_mac];

  // ------------------------------------------------- MSB plane codec
  logic             enc_cw_valid, cw_rd_valid, cw_rd_ready;
  logic [LEN_W-1:0] enc_cw, cw_rd_data;
  logic             dec_valid, dec_bit;

  rle_encoder #(.LEN_W(LEN_W)) u_enc (
    .clk, .rst_n, .in_valid(enc_valid), .in_bit(sel_msb), .flush(enc_flush),
    .cw_valid(enc_cw_valid), .cw(enc_cw)
  );

  rle_decoder #(.LEN_W(LEN_W)) u_dec (
    .clk, .rst_n, .clear(dec_clear), .cw_valid(cw_rd_valid), .cw(cw_rd_data),
    .cw_ready(cw_rd_ready), .out_valid(dec_valid), .out_bit(dec_bit),
    .out_ready(dec_ready)
  );

  // -------------------------------------------------- output buffer
  byte_t reload_byte;

  output_buffer #(.PSUM_DEPTH(PSUM_DEPTH), .RLE_DEPTH(RLE_DEPTH), .LEN_W(LEN_W)) u_obuf (
    .clk, .rst_n,
    .wr_en(buf_wr_en), .wr_bank(bank_w), .wr_addr(buf_addr), .wr_data(sel_byte),
    .rd_bank(~bank_w), .rd_addr(buf_addr), .rd_data(reload_byte),
    .h_bank(rd_bank), .h_addr(rd_addr), .h_data(rd_data),
    .cw_wr(enc_cw_valid), .cw_wr_clear, .ovf_clear, .cw_wr_bank(bank_w),
    .cw_wr_data(enc_cw), .cw_rd_start, .cw_rd_bank(~bank_w),
    .cw_rd_ready, .cw_rd_valid, .cw_rd_data, .cw_count(rle_words),
    .overflow(rle_overflow)
  );

  psum_merge u_merge (
    .stored(reload_byte), .abs_msb(dec_valid && dec_bit), .p(reload_psum)
  );
endmodule
