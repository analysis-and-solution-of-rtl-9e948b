// rle_encoder: bit-level run-length encoder.
//
// Takes a stream of single bits and emits code words of LEN_W bits, each
// holding a Run (the repeated bit value, in the top bit) and a Length (the
// number of repetitions minus one, in the LEN_W-1 low bits). A run ends when
// the input bit changes, when it reaches 2**(LEN_W-1) bits, or on flush.
// The code word is as wide as LEN_W so that it packs into a memory word
// whose width is a multiple of eight; LEN_W = 16 is the size the design uses.
//
// The (Run, Length) code and the 16-bit size follow the method; the word
// layout, the split of long runs and the flush are this implementation's
// choices.
//
// Interface: in_valid/in_bit deliver one bit per cycle; flush (a cycle with
// in_valid low) emits the run in progress and empties the encoder. There is
// no back-pressure: a code word is presented on cw/cw_valid for exactly one
// cycle, the cycle after the bit that closed the run or after flush.
// Reset (asynchronous, active low) empties the encoder.
module rle_encoder #(
  parameter int unsigned LEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_bit,
  input  logic             flush,
  output logic             cw_valid,
  output logic [LEN_W-1:0] cw
);
  localparam logic [LEN_W-2:0] CNT_MAX = '1;

  logic             active, run_bit;
  logic [LEN_W-2:0] cnt;   // run length minus one

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      run_bit  <= 1'b0;
      cnt      <= '0;
      cw_valid <= 1'b0;
      cw       <= '0;
    end else begin
      cw_valid <= 1'b0;
      if (in_valid) begin
        if (!active) begin
          active  <= 1'b1;
          run_bit <= in_bit;
          cnt     <= '0;
        end else if (in_bit == run_bit && cnt != CNT_MAX) begin
          cnt <= cnt + 1'b1;
        end else begin
          cw_valid <= 1'b1;
          cw       <= {run_bit, cnt};
          run_bit  <= in_bit;
          cnt      <= '0;
        end
      end else if (flush && active) begin
        cw_valid <= 1'b1;
        cw       <= {run_bit, cnt};
        active   <= 1'b0;
      end
    end
  end

  // flush is only defined in a cycle without an input bit.
  a_flush_alone: assert property (@(posedge clk) disable iff (!rst_n) !(flush && in_valid));
endmodule
