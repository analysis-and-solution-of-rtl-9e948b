// operand_buffer: double-buffered on-chip store of ifmap and filter operands.
//
// The accelerator keeps its input feature map and filter data double-
// buffered, so that loading the next block of operands overlaps with
// computing on the current one. Here a bank holds one chunk: the n_steps
// operand sets of one (channel tile, group) pair, where a set is one ifmap
// byte per PE and one filter byte per output channel, i.e. exactly what the
// MAC array consumes in one cycle. The writer fills one bank while the
// reader streams the other; the banks swap roles when a chunk is complete.
// Storing whole operand sets (rather than an ifmap tile plus an address
// generator that forms convolution windows) is the simplest organization
// that provides the double buffering; it is this implementation's choice.
//
// Write side: fill_valid/fill_ready with fill_ifmap/fill_weight; fill_last
// marks the last set of a chunk and hands the bank to the reader.
// fill_ready is low while the bank to be filled still holds an unread chunk.
// Read side: out_valid/out_ready with out_ifmap/out_weight (combinational
// read of the current bank). A chunk may hold 1..DEPTH sets.
// Reset (asynchronous, active low) empties both banks.
module operand_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned N_PE  = 6,
  parameter int unsigned N_MAC = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    fill_valid,
  output logic    fill_ready,
  input  logic    fill_last,
  input  ifmap_t  fill_ifmap  [N_PE],
  input  weight_t fill_weight [N_MAC],
  output logic    out_valid,
  input  logic    out_ready,
  output ifmap_t  out_ifmap   [N_PE],
  output weight_t out_weight  [N_MAC]
);
  localparam int unsigned SW = (N_PE + N_MAC) * BW_I;
  typedef logic [SW-1:0] set_t;

  set_t        mem [2*DEPTH];
  logic        full [2];        // bank holds a complete, unread chunk
  logic [AW:0] len  [2];        // sets in the chunk
  logic        wbank, rbank;
  logic [AW:0] wptr, rptr;
  set_t        wset, rset;

  // pack / unpack one operand set
  for (genvar p = 0; p < N_PE; p++) begin : g_pack_i
    assign wset[p*BW_I +: BW_I] = fill_ifmap[p];
    assign out_ifmap[p]         = ifmap_t'(rset[p*BW_I +: BW_I]);
  end
  for (genvar m = 0; m < N_MAC; m++) begin : g_pack_w
    assign wset[(N_PE+m)*BW_I +: BW_I] = fill_weight[m];
    assign out_weight[m]               = weight_t'(rset[(N_PE+m)*BW_I +: BW_I]);
  end
  // both banks in one array, the bank number being the top address bit
  assign rset = mem[{rbank, rptr[AW-1:0]}];

  assign fill_ready = !full[wbank];
  assign out_valid  = full[rbank];

  always_ff @(posedge clk) begin
    if (fill_valid && fill_ready) mem[{wbank, wptr[AW-1:0]}] <= wset;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full[0] <= 1'b0;
      full[1] <= 1'b0;
      len[0]  <= '0;
      len[1]  <= '0;
      wbank   <= 1'b0;
      rbank   <= 1'b0;
      wptr    <= '0;
      rptr    <= '0;
    end else begin
      if (fill_valid && fill_ready) begin
        if (fill_last) begin
          full[wbank] <= 1'b1;
          len[wbank]  <= wptr + 1'b1;
          wbank       <= ~wbank;
          wptr        <= '0;
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (rptr + 1'b1 == len[rbank]) begin
          full[rbank] <= 1'b0;
          rbank       <= ~rbank;
          rptr        <= '0;
        end else begin
          rptr <= rptr + 1'b1;
        end
      end
    end
  end

  // a chunk may not run past the end of a bank
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    fill_valid && fill_ready && !fill_last |-> wptr < (AW+1)'(DEPTH - 1));
endmodule
