// tb_seed_gen: checks the seed stream of several lines.
//
// For random line addresses and sequence numbers the generator must emit,
// starting the cycle after start, exactly sixteen seeds on consecutive
// cycles, seed b = (line base address + 8*b) + sequence number, tagged with
// the requested destination and block index b, and ignore a start while busy.
module tb_seed_gen;
  import otp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [VA_W-1:0] line_va = '0;
  seq_t seq = '0;
  eng_dst_e dst = DST_RD_PAD;
  logic busy, out_valid;
  logic [63:0] out_seed;
  eng_tag_t out_tag;

  seed_gen dut (.clk, .rst_n, .start, .line_va, .seq, .dst, .busy, .out_valid, .out_seed, .out_tag);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [VA_W-1:0] va;
    seq_t s;
    eng_dst_e d;
    logic [63:0] exp;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 30; n++) begin
      va = VA_W'({$urandom, $urandom});
      s  = (n == 0) ? '0 : SEQ_W'($urandom);
      d  = (n % 2 == 1) ? DST_WR_PAD : DST_RD_PAD;
      @(negedge clk);
      checks++;
      if (out_valid || busy) begin failures++; $display("FAIL busy before start"); end
      start = 1'b1; line_va = va; seq = s; dst = d;
      for (int b = 0; b < BLKS; b++) begin
        @(negedge clk);
        // a second start while busy must be ignored
        start = (b == 3);
        line_va = ~va;
        exp = 64'({va[VA_W-1:7], 7'b0} + VA_W'(8 * b)) + 64'(s);
        checks++;
        if (!out_valid || out_seed != exp || out_tag.blk != BLK_IDX_W'(b) || out_tag.dst != d) begin
          failures++;
          $display("FAIL line %h blk %0d: valid %b seed %h tag %0d exp %h", va, b, out_valid,
                   out_seed, out_tag.blk, exp);
        end
      end
      start = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL stream too long"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
