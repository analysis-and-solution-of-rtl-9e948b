// controller: sequencer of a channel-tiled convolution.
//
// One operation computes n_groups blocks of N_PE*N_MAC outputs, with the
// input channels split into n_tiles channel tiles of n_steps MAC steps each.
// For every tile and every group the order is:
//   LOAD     first tile: all accumulators take the bias in one cycle;
//            later tiles: one accumulator per cycle takes the psum the
//            previous tile left in the other buffer bank (stored byte plus
//            one bit from the run-length decoder);
//   COMPUTE  n_steps operand sets, one per cycle, each accepted with the
//            in_valid/in_ready handshake (a missing operand stalls the MACs);
//   STORE    one output per cycle is extracted and written to the current
//            bank; its absolute MSB goes to the run-length encoder. In the
//            last tile the 8-bit OFMAP is stored instead and nothing is
//            encoded.
// After the last group of a tile the encoder is flushed (FLUSH, FLUSH_WAIT
// lets the last code word land) and the banks swap (TILE_BEGIN). done pulses
// for one cycle at the end; result_bank names the bank holding the OFMAP.
// The order of the steps follows the tile procedure of the design (bias,
// accumulate, extract, reload); the serial load and store, one output per
// cycle, are this implementation's choice.
//
// If the decoder has no bit when one is needed (only after a code word
// region overflowed) a zero is used, so the sequence never hangs.
// Reset: asynchronous, active low, to IDLE.
module controller
  import cnn_pkg::*;
#(
  parameter int unsigned N_PE  = 6,
  parameter int unsigned N_MAC = 8,
  parameter int unsigned AW    = 12,
  localparam int unsigned PW = (N_PE  > 1) ? $clog2(N_PE)  : 1,
  localparam int unsigned MW = (N_MAC > 1) ? $clog2(N_MAC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   n_tiles,     // >= 1
  input  logic [15:0]   n_steps,
  input  logic [7:0]    n_groups,    // >= 1
  input  logic          in_valid,
  output logic          in_ready,
  output logic          mac_en,
  output load_e         ld,
  output logic          ld_all,      // load every MAC (bias)
  output logic [PW-1:0] sel_pe,      // output selected for load / store
  output logic [MW-1:0] sel_mac,
  output logic          final_q,
  output logic          buf_wr_en,
  output logic [AW-1:0] buf_addr,    // psum address of the selected output
  output logic          bank_w,      // bank written by this tile
  output logic          enc_valid,
  output logic          enc_flush,
  output logic          dec_ready,
  output logic          dec_clear,
  output logic          cw_rd_start,
  output logic          cw_wr_clear,
  output logic          ovf_clear,
  output logic          busy,
  output logic          done,
  output logic          result_bank
);
  typedef enum logic [2:0] {
    S_IDLE, S_TILE_BEGIN, S_LOAD, S_COMPUTE, S_STORE, S_FLUSH, S_FLUSH_WAIT, S_DONE
  } state_e;

  state_e        state;
  logic [15:0]   tile;
  logic [7:0]    group;
  logic [15:0]   step;
  logic [AW-1:0] base;
  logic          last_out, first_tile, last_tile, last_group;

  assign first_tile = tile == '0;
  assign last_tile  = tile == n_tiles - 1'b1;
  assign last_group = group == n_groups - 1'b1;
  assign last_out   = sel_pe == PW'(N_PE - 1) && sel_mac == MW'(N_MAC - 1);
  assign buf_addr   = base + AW'(sel_pe) * AW'(N_MAC) + AW'(sel_mac);

  always_comb begin
    in_ready    = state == S_COMPUTE;
    mac_en      = state == S_COMPUTE && in_valid;
    ld          = LD_NONE;
    ld_all      = 1'b0;
    if (state == S_LOAD) begin
      ld     = first_tile ? LD_BIAS : LD_PSUM;
      ld_all = first_tile;
    end
    dec_ready   = state == S_LOAD && !first_tile;
    final_q     = last_tile;
    buf_wr_en   = state == S_STORE;
    enc_valid   = state == S_STORE && !last_tile;
    enc_flush   = state == S_FLUSH;
    dec_clear   = state == S_TILE_BEGIN;
    cw_rd_start = state == S_TILE_BEGIN;
    cw_wr_clear = state == S_TILE_BEGIN;
    ovf_clear   = state == S_IDLE && start;
    busy        = state != S_IDLE;
    done        = state == S_DONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      tile        <= '0;
      group       <= '0;
      step        <= '0;
      base        <= '0;
      sel_pe      <= '0;
      sel_mac     <= '0;
      bank_w      <= 1'b0;
      result_bank <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          tile   <= '0;
          bank_w <= 1'b0;
          state  <= S_TILE_BEGIN;
        end
        S_TILE_BEGIN: begin
          group   <= '0;
          base    <= '0;
          sel_pe  <= '0;
          sel_mac <= '0;
          state   <= S_LOAD;
        end
        S_LOAD: begin
          if (first_tile || last_out) begin
            sel_pe  <= '0;
            sel_mac <= '0;
            step    <= '0;
            state   <= (n_steps == '0) ? S_STORE : S_COMPUTE;
          end else begin
            step_sel();
          end
        end
        S_COMPUTE: if (in_valid) begin
          step <= step + 1'b1;
          if (step == n_steps - 1'b1) state <= S_STORE;
        end
        S_STORE: begin
          if (last_out) begin
            sel_pe  <= '0;
            sel_mac <= '0;
            if (last_group) begin
              if (last_tile) result_bank <= bank_w;
              state <= last_tile ? S_DONE : S_FLUSH;
            end else begin
              group <= group + 1'b1;
              base  <= base + AW'(N_PE * N_MAC);
              state <= S_LOAD;
            end
          end else begin
            step_sel();
          end
        end
        S_FLUSH:      state <= S_FLUSH_WAIT;
        S_FLUSH_WAIT: begin
          tile   <= tile + 1'b1;
          bank_w <= ~bank_w;
          state  <= S_TILE_BEGIN;
        end
        S_DONE:       state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Advance the (PE, MAC) output selection in PE-major order.
  task automatic step_sel();
    if (sel_mac == MW'(N_MAC - 1)) begin
      sel_mac <= '0;
      sel_pe  <= sel_pe + 1'b1;
    end else begin
      sel_mac <= sel_mac + 1'b1;
    end
  endtask

  a_tiles:  assert property (@(posedge clk) disable iff (!rst_n) start && state == S_IDLE |-> n_tiles != '0 && n_groups != '0);
endmodule
