// tb_rle_encoder: self-checking test of the bit-level run-length encoder.
//
// Four encoders are tested side by side: the 8-, 16- and 32-bit code words
// whose compression the reference design compares (16 bits being its
// choice and the default), and a 4-bit code word, whose 8-bit maximum run
// makes the split of long runs happen often. Random bit streams (sparse, dense and
// alternating) with idle cycles and a flush at the end of each stream are
// fed to both; a software encoder in the testbench predicts every code word
// and the cycle in which it appears (the cycle after the bit that ends the
// run, or after flush).
module tb_rle_encoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_bit, flush;
  logic cw_valid_a, cw_valid_b, cw_valid_c, cw_valid_d;
  logic [15:0] cw_a;
  logic [3:0]  cw_b;
  logic [7:0]  cw_c;
  logic [31:0] cw_d;
  int checks = 0, failures = 0;

  rle_encoder #(.LEN_W(16)) dut_a (.clk, .rst_n, .in_valid, .in_bit, .flush, .cw_valid(cw_valid_a), .cw(cw_a));
  rle_encoder #(.LEN_W(4))  dut_b (.clk, .rst_n, .in_valid, .in_bit, .flush, .cw_valid(cw_valid_b), .cw(cw_b));
  rle_encoder #(.LEN_W(8))  dut_c (.clk, .rst_n, .in_valid, .in_bit, .flush, .cw_valid(cw_valid_c), .cw(cw_c));
  rle_encoder #(.LEN_W(32)) dut_d (.clk, .rst_n, .in_valid, .in_bit, .flush, .cw_valid(cw_valid_d), .cw(cw_d));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference encoder state, one per width
  // lb = LEN_W - 1 bits of Length-1; the longest run is 2^lb bits
  typedef struct { bit active; bit rb; longint cnt; int lb; } ref_t;
  ref_t ra, rb_, rc, rd;
  int   splits = 0;

  // returns 1 and the code word if this input closes a run
  function automatic bit ref_step(ref ref_t r, input bit v, input bit b, input bit f,
                                  output longint word);
    word = 0;
    if (v) begin
      if (!r.active) begin r.active = 1; r.rb = b; r.cnt = 0; return 0; end
      if (b == r.rb && r.cnt != (longint'(1) << r.lb) - 1) begin r.cnt++; return 0; end
      word = (longint'(r.rb) << r.lb) | r.cnt;
      if (b == r.rb) splits++;
      r.rb = b; r.cnt = 0; return 1;
    end else if (f && r.active) begin
      word = (longint'(r.rb) << r.lb) | r.cnt;
      r.active = 0; return 1;
    end
    return 0;
  endfunction

  task automatic drive(bit v, bit b, bit f);
    longint wa, wb, wc, wd;
    bit ea, eb, ec, ed;
    in_valid = v; in_bit = b; flush = f;
    ea = ref_step(ra, v, b, f, wa);
    eb = ref_step(rb_, v, b, f, wb);
    ec = ref_step(rc, v, b, f, wc);
    ed = ref_step(rd, v, b, f, wd);
    @(posedge clk); #1;
    checks++;
    if (cw_valid_a != ea || (ea && longint'(cw_a) != wa)) begin
      failures++; $display("16-bit: valid=%0b cw=%h exp %0b %h", cw_valid_a, cw_a, ea, wa);
    end
    checks++;
    if (cw_valid_b != eb || (eb && longint'(cw_b) != wb)) begin
      failures++; $display("4-bit: valid=%0b cw=%h exp %0b %h", cw_valid_b, cw_b, eb, wb);
    end
    checks++;
    if (cw_valid_c != ec || (ec && longint'(cw_c) != wc)) begin
      failures++; $display("8-bit: valid=%0b cw=%h exp %0b %h", cw_valid_c, cw_c, ec, wc);
    end
    checks++;
    if (cw_valid_d != ed || (ed && longint'(cw_d) != wd)) begin
      failures++; $display("32-bit: valid=%0b cw=%h exp %0b %h", cw_valid_d, cw_d, ed, wd);
    end
  endtask

  initial begin
    ra  = '{0, 0, 0, 15};
    rb_ = '{0, 0, 0, 3};
    rc  = '{0, 0, 0, 7};
    rd  = '{0, 0, 0, 31};
    in_valid = 0; in_bit = 0; flush = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 60; s++) begin
      automatic int len = $urandom_range(1, 600);
      automatic int mode = s % 3;
      for (int i = 0; i < len; i++) begin
        bit b;
        case (mode)
          0: b = ($urandom_range(0, 99) < 3);     // sparse, like |psum| MSBs
          1: b = 1'($urandom_range(0, 1));
          default: b = i[0];                       // alternating
        endcase
        if ($urandom_range(0, 9) == 0) drive(0, 0, 0);
        drive(1, b, 0);
      end
      drive(0, 0, 1);
      drive(0, 0, 0);
    end
    // one run longer than the 16-bit maximum (2^15 bits)
    for (int i = 0; i < 40000; i++) drive(1, 0, 0);
    drive(0, 0, 1);
    drive(0, 0, 0);
    checks++; if (splits < 10) begin failures++; $display("too few max-length splits"); end
    $display("max-length splits=%0d", splits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
