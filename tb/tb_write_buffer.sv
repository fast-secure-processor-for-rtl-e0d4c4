// tb_write_buffer: checks the write buffer against a queue model.
//
// Random pushes of line and sequence-number entries and random pops, with
// the buffer driven to full and to empty. Checks the head entry, the count,
// empty/full, that a push into a full buffer is dropped, and both search
// ports (line address match over stored lines, youngest stored sequence
// number of a line) in every cycle.
module tb_write_buffer;
  import otp_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push_valid = 1'b0, pop = 1'b0;
  wb_entry_t push_entry, head_entry;
  logic empty, full, line_match, seq_match;
  logic [$clog2(DEPTH):0] count;
  logic [PA_W-1:0] srch_pa = '0;
  ltag_t srch_tag = '0;
  seq_t seq_match_val;

  write_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push_valid, .push_entry, .pop, .head_entry,
    .empty, .full, .count, .srch_pa, .srch_tag, .line_match, .seq_match, .seq_match_val);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, fulls = 0, seq_hits = 0, line_hits = 0;
  wb_entry_t q[$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check_now();
    logic lm = 0, sm = 0;
    seq_t sv = '0;
    foreach (q[i]) begin
      if (q[i].kind == WB_LINE && q[i].pa[PA_W-1:7] == srch_pa[PA_W-1:7]) lm = 1;
      if (q[i].kind == WB_SEQ && q[i].va[VA_W-1:7] == srch_tag) begin sm = 1; sv = q[i].seq; end
    end
    checks++;
    if (int'(count) != q.size() || empty != (q.size() == 0) || full != (q.size() == DEPTH) ||
        (q.size() > 0 && head_entry != q[0]) || line_match != lm || seq_match != sm ||
        (sm && seq_match_val != sv)) begin
      failures++;
      $display("FAIL count %0d/%0d lm %b/%b sm %b/%b", count, q.size(), line_match, lm, seq_match, sm);
    end
    if (lm) line_hits++;
    if (sm) seq_hits++;
    if (full) fulls++;
  endfunction

  initial begin
    push_entry = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      srch_pa  = PA_W'({$urandom_range(0, 5), 7'($urandom)});
      srch_tag = ltag_t'($urandom_range(0, 5));
      #1 check_now();
      // phases that favour filling and draining
      push_valid = ($urandom_range(0, 99) < ((n / 200) % 2 == 1 ? 70 : 30));
      pop        = ($urandom_range(0, 99) < ((n / 200) % 2 == 1 ? 30 : 70));
      push_entry.kind = ($urandom_range(0, 1) == 1) ? WB_SEQ : WB_LINE;
      push_entry.cls  = REQ_DATA;
      push_entry.pa   = PA_W'({$urandom_range(0, 5), 7'($urandom)});
      push_entry.va   = VA_W'({$urandom_range(0, 5), 7'b0});
      push_entry.seq  = seq_t'($urandom);
      push_entry.data = line_t'({$urandom, $urandom});
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      // the buffer sees full as it was before the pop of the same cycle
      if (push_valid && !full) q.push_back(push_entry);
    end
    checks++;
    if (fulls == 0 || seq_hits == 0 || line_hits == 0) begin
      failures++;
      $display("FAIL coverage: full %0d seq hits %0d line hits %0d", fulls, seq_hits, line_hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
