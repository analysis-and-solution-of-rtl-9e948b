// rle_decoder: bit-level run-length decoder, inverse of rle_encoder.
//
// Code words are LEN_W bits: the top bit is the Run (bit value), the low
// LEN_W-1 bits the Length minus one. The decoder expands them into a bit
// stream with a valid/ready handshake. The first bit of a code word is
// passed straight through from cw, so a new run costs no bubble cycle; the
// word is consumed (cw_ready) in the cycle that bit is taken, and the rest of
// the run is served from an internal counter. Output therefore runs at one
// bit per cycle whenever the consumer is ready and words are available.
//
// Decoding as such follows the method; the handshakes and the
// pass-through of the first bit are this implementation's choices.
//
// Interface: cw/cw_valid/cw_ready accept code words, out_bit/out_valid/
// out_ready deliver bits. clear drops any run in progress (used when a new
// stream starts). Reset (asynchronous, active low) has the same effect.
module rle_decoder #(
  parameter int unsigned LEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             cw_valid,
  input  logic [LEN_W-1:0] cw,
  output logic             cw_ready,
  output logic             out_valid,
  output logic             out_bit,
  input  logic             out_ready
);
  logic             have_run, run_bit;
  logic [LEN_W-2:0] rem;    // bits of the current run still to deliver

  assign out_valid = have_run || cw_valid;
  assign out_bit   = have_run ? run_bit : cw[LEN_W-1];
  assign cw_ready  = !have_run && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_run <= 1'b0;
      run_bit  <= 1'b0;
      rem      <= '0;
    end else if (clear) begin
      have_run <= 1'b0;
    end else if (out_ready) begin
      if (have_run) begin
        rem <= rem - 1'b1;
        if (rem == 1) have_run <= 1'b0;
      end else if (cw_valid) begin
        run_bit  <= cw[LEN_W-1];
        rem      <= cw[LEN_W-2:0];
        have_run <= cw[LEN_W-2:0] != '0;
      end
    end
  end
endmodule
