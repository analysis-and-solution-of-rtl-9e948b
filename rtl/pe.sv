// pe: processing element of N_MAC multiply-and-accumulate units.
//
// All MACs of a PE take the same ifmap value each cycle and their own filter
// value, so one PE accumulates N_MAC output channels of one output position.
// Behind every MAC sits its own write-back path: the accumulator is
// extracted (rounded and saturated) to the 9-bit extended psum, which is
// split into the stored byte {sign, seven LSBs} and the absolute-value MSB
// that goes to the run-length encoder. After the last channel tile the same
// extraction produces the 8-bit OFMAP value instead, whose byte comes out of
// the same split unchanged (the abs_msb output is then ignored).
//
// Eight MACs per PE and one extraction path per accumulator follow the
// method; sharing the ifmap byte among the MACs is this implementation's
// choice.
//
// Loading: ld selects bias or psum; ld_mask chooses which MACs load. Biases
// come one per MAC; a reloaded psum is shared and loaded into the MAC whose
// mask bit is set, so the controller restores one accumulator per cycle.
//
// Timing: accumulate and load as in mac (one cycle); the write-back outputs
// are combinational from the accumulators.
module pe
  import cnn_pkg::*;
#(
  parameter int unsigned N_MAC = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  load_e            ld,
  input  logic [N_MAC-1:0] ld_mask,
  input  byte_t            bias    [N_MAC],
  input  xpsum_t           ld_psum,
  input  shift_t           shift,
  input  logic             en,
  input  ifmap_t           a,
  input  weight_t          w       [N_MAC],
  input  logic             final_q,
  output byte_t            out_byte[N_MAC],  // stored psum byte or OFMAP byte
  output logic             abs_msb [N_MAC],
  output logic             sat     [N_MAC],
  output logic             rnd     [N_MAC]
);
  for (genvar i = 0; i < N_MAC; i++) begin : g_mac
    acc_t   acc;
    xpsum_t q;
    byte_t  stored;
    load_e  ld_i;

    assign ld_i = ld_mask[i] ? ld : LD_NONE;

    mac u_mac (
      .clk, .rst_n, .ld(ld_i), .ld_bias(bias[i]), .ld_psum, .shift,
      .en, .a, .w(w[i]), .acc
    );
    psum_extract u_ext (
      .acc, .shift, .final_q, .q, .sat(sat[i]), .rnd(rnd[i])
    );
    psum_split u_split (
      .p(q), .stored, .abs_msb(abs_msb[i])
    );
    // An OFMAP value fits in 8 bits, so bit 8 of q equals bit 7 and the
    // split byte {q[8], q[6:0]} is the OFMAP byte itself: one path serves
    // both modes.
    assign out_byte[i] = stored;
  end
endmodule
