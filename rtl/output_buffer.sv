// output_buffer: double-buffered output buffer for psums and compressed MSBs.
//
// Two banks (Buffer 0 and Buffer 1). Each bank holds the stored psum bytes of
// one channel tile (sign + seven low bits of every extended psum, or the
// final OFMAP bytes) and, in a region of its own, the run-length code words
// of the cut-out MSB plane of the same tile. While one bank is written by the
// tile being computed, the other still holds the previous tile's psums,
// which are read back to initialise the accumulators.
//
// Two banks holding psums and compressed MSBs follow the method; separate
// regions, their sizes, overflow handling and the read ports are this
// implementation's choices.
//
// psum region: random access, one byte written per cycle, two combinational
// read ports (one for psum reload, one for the host that fetches the OFMAP).
// Code word region: a write pointer per bank; cw_wr appends at the pointer of
// cw_wr_bank, cw_wr_clear empties that bank's region. If the region is full
// the word is dropped and the sticky overflow flag is set (cleared by
// ovf_clear, at the start of an operation). The reader has one read
// pointer: cw_rd_start (re)starts it at the beginning of cw_rd_bank,
// cw_rd_valid tells whether a word is left, cw_rd_ready advances it.
// Memory contents are not reset; pointers and the flag are (asynchronous,
// active low).
module output_buffer #(
  parameter int unsigned PSUM_DEPTH = 4096,
  parameter int unsigned RLE_DEPTH  = 256,
  parameter int unsigned LEN_W      = 16,
  localparam int unsigned AW  = $clog2(PSUM_DEPTH),
  localparam int unsigned CAW = $clog2(RLE_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // psum bytes
  input  logic             wr_en,
  input  logic             wr_bank,
  input  logic [AW-1:0]    wr_addr,
  input  logic [7:0]       wr_data,
  input  logic             rd_bank,
  input  logic [AW-1:0]    rd_addr,
  output logic [7:0]       rd_data,
  input  logic             h_bank,
  input  logic [AW-1:0]    h_addr,
  output logic [7:0]       h_data,
  // compressed MSB code words
  input  logic             cw_wr,
  input  logic             cw_wr_clear,
  input  logic             ovf_clear,
  input  logic             cw_wr_bank,
  input  logic [LEN_W-1:0] cw_wr_data,
  input  logic             cw_rd_start,
  input  logic             cw_rd_bank,
  input  logic             cw_rd_ready,
  output logic             cw_rd_valid,
  output logic [LEN_W-1:0] cw_rd_data,
  output logic [CAW:0]     cw_count [2],   // code words held per bank
  output logic             overflow
);
  // both banks in one array each, the bank number being the top address bit
  logic [7:0]       psum_mem [2*PSUM_DEPTH];
  logic [LEN_W-1:0] cw_mem   [2*RLE_DEPTH];
  localparam logic [CAW:0] RLE_N = (CAW+1)'(RLE_DEPTH);
  logic [CAW:0]     wptr [2];
  logic [CAW:0]     rptr;
  logic             rbank;

  always_ff @(posedge clk) begin
    if (wr_en) psum_mem[{wr_bank, wr_addr}] <= wr_data;
    if (cw_wr && !cw_wr_clear && wptr[cw_wr_bank] < RLE_N)
      cw_mem[{cw_wr_bank, wptr[cw_wr_bank][CAW-1:0]}] <= cw_wr_data;
  end

  assign rd_data = psum_mem[{rd_bank, rd_addr}];
  assign h_data  = psum_mem[{h_bank, h_addr}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr[0]  <= '0;
      wptr[1]  <= '0;
      overflow <= 1'b0;
    end else if (ovf_clear && !cw_wr_clear) begin
      overflow <= 1'b0;
    end else if (cw_wr_clear) begin
      wptr[cw_wr_bank] <= '0;
      if (ovf_clear) overflow <= 1'b0;
    end else if (cw_wr) begin
      if (wptr[cw_wr_bank] < RLE_N) wptr[cw_wr_bank] <= wptr[cw_wr_bank] + 1'b1;
      else                              overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr  <= '0;
      rbank <= 1'b0;
    end else if (cw_rd_start) begin
      rptr  <= '0;
      rbank <= cw_rd_bank;
    end else if (cw_rd_ready && cw_rd_valid) begin
      rptr <= rptr + 1'b1;
    end
  end

  assign cw_rd_valid = rptr < wptr[rbank];
  assign cw_rd_data  = cw_mem[{rbank, rptr[CAW-1:0]}];
  assign cw_count    = wptr;
endmodule
