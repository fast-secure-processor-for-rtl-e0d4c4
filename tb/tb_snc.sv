// tb_snc: checks the sequence number cache against an LRU list model.
//
// Two small instances are driven with the same random stream of lookups,
// updates and inserts on a few dozen line numbers: a fully associative one
// (8 entries) and a 4-way set-associative one (16 entries, 4 sets). A model
// keeps, per set, the lines in recency order; every response (hit, stored
// number, evicted line and its number) is compared one cycle after its
// request. Counts of hits and evictions must be non-zero.
module tb_snc;
  import otp_pkg::*;

  localparam int unsigned TW = 12, SW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid = 1'b0;
  snc_op_e req_op = SNC_LOOKUP;
  logic [TW-1:0] req_tag = '0;
  logic [SW-1:0] req_seq = '0;

  logic          rv [2], rh [2], vv [2];
  logic [SW-1:0] rs [2], vs [2];
  logic [TW-1:0] vt [2];

  snc #(.ENTRIES(8), .WAYS(8), .TAG_W(TW), .SEQ_BITS(SW)) dut_fa (
    .clk, .rst_n, .req_valid, .req_op, .req_tag, .req_seq,
    .rsp_valid(rv[0]), .rsp_hit(rh[0]), .rsp_seq(rs[0]),
    .rsp_victim_valid(vv[0]), .rsp_victim_tag(vt[0]), .rsp_victim_seq(vs[0]));

  snc #(.ENTRIES(16), .WAYS(4), .TAG_W(TW), .SEQ_BITS(SW)) dut_sa (
    .clk, .rst_n, .req_valid, .req_op, .req_tag, .req_seq,
    .rsp_valid(rv[1]), .rsp_hit(rh[1]), .rsp_seq(rs[1]),
    .rsp_victim_valid(vv[1]), .rsp_victim_tag(vt[1]), .rsp_victim_seq(vs[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, hits = 0, evicts = 0;

  typedef struct { logic [TW-1:0] tag; logic [SW-1:0] seq; } ent_t;
  ent_t lists [2][4][$];       // [instance][set] most recent first
  int unsigned ways_of [2] = '{8, 4};
  int unsigned sets_of [2] = '{1, 4};

  typedef struct { logic hit; logic [SW-1:0] seq; logic vv; logic [TW-1:0] vt; logic [SW-1:0] vs; } rsp_t;

  function automatic rsp_t model(int m, snc_op_e op, logic [TW-1:0] tag, logic [SW-1:0] seq);
    rsp_t r = '{hit: 0, seq: 0, vv: 0, vt: 0, vs: 0};
    int s = (sets_of[m] > 1) ? int'(32'(tag) % sets_of[m]) : 0;
    int pos = -1;
    ent_t e;
    foreach (lists[m][s][i]) if (lists[m][s][i].tag == tag) pos = i;
    if (pos >= 0) begin
      r.hit = 1;
      e = lists[m][s][pos];
      r.seq = e.seq;
      if (op == SNC_LOOKUP) begin
        lists[m][s].delete(pos); lists[m][s].push_front(e);
      end else begin
        e.seq = seq;
        lists[m][s].delete(pos); lists[m][s].push_front(e);
      end
    end else if (op == SNC_INSERT) begin
      if (lists[m][s].size() == ways_of[m]) begin
        e = lists[m][s].pop_back();
        r.vv = 1; r.vt = e.tag; r.vs = e.seq;
      end
      lists[m][s].push_front('{tag: tag, seq: seq});
    end
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rsp_t exp [2];
    logic was_valid;
    int unsigned sel;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    was_valid = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // Responses to the request of the previous cycle.
      if (was_valid) begin
        for (int m = 0; m < 2; m++) begin
          checks++;
          if (!rv[m] || rh[m] != exp[m].hit || (exp[m].hit && rs[m] != exp[m].seq) ||
              vv[m] != exp[m].vv || (exp[m].vv && (vt[m] != exp[m].vt || vs[m] != exp[m].vs))) begin
            failures++;
            if (failures < 10)
              $display("FAIL inst %0d op %s tag %0d: got hit %b seq %h vic %b %0d %h exp hit %b seq %h vic %b %0d %h",
                       m, req_op.name(), req_tag, rh[m], rs[m], vv[m], vt[m], vs[m],
                       exp[m].hit, exp[m].seq, exp[m].vv, exp[m].vt, exp[m].vs);
          end
          if (exp[m].hit) hits++;
          if (exp[m].vv) evicts++;
        end
      end
      was_valid = ($urandom_range(0, 7) != 0);
      req_valid = was_valid;
      sel = $urandom_range(0, 2);
      case (sel)
        0: req_op = SNC_LOOKUP;
        1: req_op = SNC_UPDATE;
        default: req_op = SNC_INSERT;
      endcase
      req_tag = TW'($urandom_range(0, 23));
      req_seq = SW'($urandom);
      if (was_valid)
        for (int m = 0; m < 2; m++) exp[m] = model(m, req_op, req_tag, req_seq);
    end
    checks++;
    if (hits == 0 || evicts == 0) begin
      failures++;
      $display("FAIL hits %0d evictions %0d", hits, evicts);
    end
    $display("hits %0d evictions %0d", hits, evicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
