// tb_otp_secure_mem: end-to-end test of the one-time-pad memory path.
//
// A small sequence number cache (4 entries, fully associative) and a 4-entry
// write buffer make every mechanism happen within a few thousand cycles. An
// L2-side reader and writer run concurrently on 12 data lines, 4 code lines
// and 4 plain lines, against the 100-cycle memory model:
//   - every read must return the last plaintext the L2 wrote back for that
//     line (or the vendor's code / the plain data);
//   - a read that hits in the cache, and every code read, must take exactly
//     memory latency + 1 cycles; a read that has to fetch its sequence number
//     from memory must take at least memory + cipher latency;
//   - every data line sent to memory must differ from its plaintext, and a
//     line written again must be enciphered with a different pad;
//   - every sequence number written to memory must decipher to a word naming
//     its own line;
//   - code lines are preloaded as code XOR DES_k(block address), computed by
//     the testbench's own reference, so the pads are checked bit for bit.
// The count of each mechanism (snc query/update hits and misses, eviction,
// sequence-number write-back and forwarding, first write, read waiting for
// the write buffer, code, plain, memory and write-buffer back-pressure) must
// be non-zero.
module tb_otp_secure_mem;
  import otp_pkg::*;
  import des_pkg::*;

  localparam logic [63:0] KEY = 64'h0E329232EA6D0D73;
  localparam int unsigned NDATA = 12, NCODE = 4, NPLAIN = 4;
  localparam logic [PA_W-1:0] SEQ_BASE = 48'h0000_0080_0000;
  localparam int unsigned NOPS = 700;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic key_we = 1'b0;
  logic l2_rd_valid = 1'b0, l2_rd_ready, l2_rd_resp_valid;
  logic [PA_W-1:0] l2_rd_pa = '0;
  logic [VA_W-1:0] l2_rd_va = '0;
  req_kind_e l2_rd_kind = REQ_DATA;
  line_t l2_rd_resp_data;
  logic l2_wb_valid = 1'b0, l2_wb_ready;
  logic [PA_W-1:0] l2_wb_pa = '0;
  logic [VA_W-1:0] l2_wb_va = '0;
  req_kind_e l2_wb_kind = REQ_DATA;
  line_t l2_wb_data = '0;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_req_word, mem_rsp_valid;
  logic [PA_W-1:0] mem_req_addr;
  line_t mem_req_wdata, mem_rsp_rdata;
  otp_events_t ev;

  otp_secure_mem #(.SNC_SIZE(4), .SNC_WAYS(4), .WB_DEPTH(4)) dut (
    .clk, .rst_n, .key_we, .key_i(KEY), .seq_base(SEQ_BASE),
    .l2_rd_valid, .l2_rd_ready, .l2_rd_pa, .l2_rd_va, .l2_rd_kind,
    .l2_rd_resp_valid, .l2_rd_resp_data,
    .l2_wb_valid, .l2_wb_ready, .l2_wb_pa, .l2_wb_va, .l2_wb_kind, .l2_wb_data,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_word, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_rdata, .events(ev)
  );

  tb_mem_model #(.LAT(MEM_LAT), .STALL_PCT(10)) mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_word(mem_req_word), .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata)
  );

  // Address map: data lines have unrelated virtual and physical addresses.
  function automatic logic [VA_W-1:0] data_va(int i);  return VA_W'(48'h0000_4000_0000 + 128 * i); endfunction
  function automatic logic [PA_W-1:0] data_pa(int i);
    int unsigned off;
    off = 128 * (NDATA - 1 - i);          // reversed order: VA and PA unrelated
    return PA_W'(48'h0000_0010_0000) + PA_W'(off);
  endfunction
  function automatic logic [VA_W-1:0] code_va(int i);  return VA_W'(48'h0000_0040_0000 + 128 * i); endfunction
  function automatic logic [PA_W-1:0] code_pa(int i);  return PA_W'(48'h0000_0020_0000 + 128 * i); endfunction
  function automatic logic [PA_W-1:0] plain_pa(int i); return PA_W'(48'h0000_0030_0000 + 128 * i); endfunction

  function automatic line_t rand_line();
    line_t l;
    for (int w = 0; w < LINE_W / 32; w++) l[w*32 +: 32] = $urandom;
    return l;
  endfunction

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // ------------------------------------------------------------ reference
  line_t golden [logic [PA_W-1:0]];     // plaintext the L2 last handed over, by PA
  line_t code   [NCODE];
  line_t wr_plain [logic [PA_W-1:0]][$]; // plaintexts on their way to memory, by PA
  line_t last_ct  [logic [PA_W-1:0]];    // previous pad of each data line
  logic [63:0] written [int];           // data lines written at least once

  // ------------------------------------------------------------ counters
  int n_qh, n_qm, n_uh, n_um, n_ev, n_sqwb, n_fwd, n_first, n_raw, n_instr, n_pread, n_pwrite;
  int n_mem_stall, n_wb_full, n_hit_lat, n_miss_lat, n_ct_change;

  // ------------------------------------------------------------ monitor
  line_t       rd_exp;
  int unsigned rd_t0;
  logic        rd_fast, rd_slow;
  logic        rd_busy = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (ev.query_hit)     n_qh++;
      if (ev.query_miss)    n_qm++;
      if (ev.update_hit)    n_uh++;
      if (ev.update_miss)   n_um++;
      if (ev.snc_evict)     n_ev++;
      if (ev.seq_writeback) n_sqwb++;
      if (ev.seq_forward)   n_fwd++;
      if (ev.first_write)   n_first++;
      if (ev.raw_drain)     n_raw++;
      if (ev.instr_read)    n_instr++;
      if (ev.plain_read)    n_pread++;
      if (ev.plain_write)   n_pwrite++;
      if (mem_req_valid && !mem_req_ready) n_mem_stall++;
      if (l2_wb_valid && !l2_wb_ready) n_wb_full++;
      if (ev.query_hit) rd_fast = 1'b1;
      if (ev.query_miss && !ev.seq_forward) rd_slow = 1'b1;

      // read response (before the hand-over below: a write-back accepted in
      // the same cycle as a read is newer than that read)
      if (l2_rd_resp_valid) begin
        checks++;
        if (!rd_busy) fail("response without request");
        else if (l2_rd_resp_data != rd_exp) fail($sformatf("read data mismatch, PA %h", l2_rd_pa));
        if (rd_fast) begin
          checks++;
          n_hit_lat++;
          if (cyc - rd_t0 != MEM_LAT + 1)
            fail($sformatf("fast read took %0d cycles, expected %0d", cyc - rd_t0, MEM_LAT + 1));
        end
        if (rd_slow) begin
          checks++;
          n_miss_lat++;
          if (cyc - rd_t0 < MEM_LAT + CRYPTO_LAT)
            fail($sformatf("miss read took only %0d cycles", cyc - rd_t0));
        end
        rd_busy <= 1'b0;
      end
      if (l2_rd_valid && l2_rd_ready) begin
        if (rd_busy) fail("second read accepted while one is open");
        rd_busy <= 1'b1;
        rd_t0   = cyc;
        rd_fast = (l2_rd_kind == REQ_INSTR);
        rd_slow = 1'b0;
        if (l2_rd_kind == REQ_INSTR) begin
          for (int i = 0; i < NCODE; i++) if (code_pa(i) == l2_rd_pa) rd_exp = code[i];
        end else begin
          rd_exp = golden[l2_rd_pa];
        end
      end
      if (l2_wb_valid && l2_wb_ready) begin
        golden[l2_wb_pa] = l2_wb_data;
        wr_plain[l2_wb_pa].push_back(l2_wb_data);
      end

      // traffic to memory
      if (mem_req_valid && mem_req_ready && mem_req_we) begin
        if (mem_req_word) begin
          seq_word_t w;
          w = seq_word_t'(des_block(KEY, mem_req_wdata[63:0], 1'b1));
          checks++;
          if (!w.valid || w.zero != 0 || mem_req_addr != SEQ_BASE + PA_W'({w.tag, 3'b000}))
            fail($sformatf("sequence word at %h deciphers to %h", mem_req_addr, w));
        end else if (mem_req_addr >= plain_pa(0)) begin
          // a plain line
          checks++;
          if (wr_plain[mem_req_addr].size() == 0) fail("unexpected plain write");
          else if (mem_req_wdata != wr_plain[mem_req_addr].pop_front()) fail("plain line altered");
        end else begin
          line_t p;
          p = wr_plain[mem_req_addr].pop_front();
          for (int b = 0; b < BLKS; b++) begin
            checks++;
            if (mem_req_wdata[b*64 +: 64] == p[b*64 +: 64]) fail("plaintext block sent to memory");
          end
          // the pad of a rewritten line must be a new one
          if (last_ct.exists(mem_req_addr)) begin
            checks++;
            if ((mem_req_wdata ^ p) == last_ct[mem_req_addr]) fail("pad reused for a rewrite");
            else n_ct_change++;
          end
          last_ct[mem_req_addr] = mem_req_wdata ^ p;
        end
      end
    end
  end

  // ------------------------------------------------------------ drivers
  int rd_done = 0, wr_done = 0;

  task automatic l2_read(input req_kind_e k, input int i);
    @(negedge clk);
    l2_rd_valid = 1'b1;
    l2_rd_kind  = k;
    unique case (k)
      REQ_INSTR: begin l2_rd_va = code_va(i); l2_rd_pa = code_pa(i); end
      REQ_PLAIN: begin l2_rd_va = plain_pa(i); l2_rd_pa = plain_pa(i); end
      default:   begin l2_rd_va = data_va(i); l2_rd_pa = data_pa(i); end
    endcase
    #1;
    while (!l2_rd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    l2_rd_valid = 1'b0;
    while (!l2_rd_resp_valid) @(negedge clk);
  endtask

  task automatic l2_write(input req_kind_e k, input int i);
    @(negedge clk);
    l2_wb_valid = 1'b1;
    l2_wb_kind  = k;
    l2_wb_data  = rand_line();
    if (k == REQ_PLAIN) begin l2_wb_va = plain_pa(i); l2_wb_pa = plain_pa(i); end
    else begin l2_wb_va = data_va(i); l2_wb_pa = data_pa(i); written[i] = 1; end
    #1;
    while (!l2_wb_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    l2_wb_valid = 1'b0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: reads %0d writes %0d state %s rd_valid %b ready %b busy %b", rd_done, wr_done,
             dut.state_q.name(), l2_rd_valid, l2_rd_ready, rd_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // vendor-enciphered code: block b of a line at va is I ^ DES_k(va + 8b)
    for (int i = 0; i < NCODE; i++) begin
      code[i] = rand_line();
      for (int b = 0; b < BLKS; b++)
        mem.poke(code_pa(i) + PA_W'(8 * b),
                 code[i][b*64 +: 64] ^ des_block(KEY, 64'(code_va(i)) + 64'(8 * b), 1'b0));
    end
    for (int i = 0; i < NPLAIN; i++) begin
      golden[plain_pa(i)] = rand_line();
      for (int b = 0; b < BLKS; b++)
        mem.poke(plain_pa(i) + PA_W'(8 * b), golden[plain_pa(i)][b*64 +: 64]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    key_we = 1'b1;
    @(negedge clk);
    key_we = 1'b0;

    fork
      begin : writer
        for (int n = 0; n < NOPS; n++) begin
          int i;
          // bursts fill the write buffer; pauses let it drain
          if ((n / 40) % 2 == 1) repeat ($urandom_range(0, 150)) @(negedge clk);
          i = $urandom_range(0, NDATA - 1);
          if ($urandom_range(0, 9) == 0) l2_write(REQ_PLAIN, $urandom_range(0, NPLAIN - 1));
          else l2_write(REQ_DATA, i);
          wr_done++;
        end
      end
      begin : reader
        for (int n = 0; n < NOPS; n++) begin
          int i, sel;
          repeat ($urandom_range(0, 4)) @(negedge clk);
          sel = $urandom_range(0, 9);
          i = $urandom_range(0, NDATA - 1);
          if (sel == 0) l2_read(REQ_INSTR, $urandom_range(0, NCODE - 1));
          else if (sel == 1) l2_read(REQ_PLAIN, $urandom_range(0, NPLAIN - 1));
          else if (written.exists(i)) l2_read(REQ_DATA, i);
          rd_done++;
        end
      end
    join
    repeat (2000) @(negedge clk);

    checks++;
    if (rd_busy) fail("read left open");
    begin
      automatic string names [17] = '{"query hit", "query miss", "update hit", "update miss", "snc eviction",
        "sequence write-back", "sequence forwarding", "first write", "read waits for write buffer",
        "code read", "plain read", "plain write", "memory back-pressure", "write buffer full",
        "fast-read latency", "miss-read latency", "new pad on rewrite"};
      automatic int cnt [17];
      cnt = '{n_qh, n_qm, n_uh, n_um, n_ev, n_sqwb, n_fwd, n_first, n_raw, n_instr,
        n_pread, n_pwrite, n_mem_stall, n_wb_full, n_hit_lat, n_miss_lat, n_ct_change};
      for (int k = 0; k < 17; k++) begin
        $display("  %-28s %0d", names[k], cnt[k]);
        checks++;
        if (cnt[k] == 0) fail($sformatf("mechanism never happened: %s", names[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
