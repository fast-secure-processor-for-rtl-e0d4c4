// otp_secure_mem: one-time-pad encryption between the L2 cache and memory.
//
// Off chip, every data line is stored as plaintext XOR E_k(seed), where E_k
// is DES under the program key and the seed of each 64-bit block is its
// virtual address plus the line's sequence number. Because the seed does
// not depend on the data, the pads of a line being read are computed while
// the memory access is in flight, and the plaintext is ready one XOR after
// the data arrives (about MAX(memory, cipher) + 1 cycles instead of
// memory + cipher). Sequence numbers live in the sequence number cache
// (snc); they change on every write (old number + system timer). An entry
// pushed out of the snc is enciphered directly and kept in memory, in a
// table at seq_base + 8 * (line number), and is fetched back and deciphered
// when its line misses in the snc (LRU policy). Code lines use seed =
// block address (sequence number 0); PLAIN lines bypass the cipher.
//
// Inside: crypto_engine (pipelined DES, 50 cycles), snc, seed_gen,
// write_buffer, system_timer and two otp_line_xor combiners, one on the
// read and one on the write side, all driven by one controller FSM that
// runs one operation at a time. Reads go first; the write buffer drains
// when no read waits. A read whose line is still in the write buffer waits
// until it has drained, and a sequence number still in the write buffer is
// used from there.
//
// Interfaces (valid/ready handshakes, a transfer happens when both are 1):
//   key_we/key_i        program key k (after the vendor's key is unwrapped).
//   seq_base            physical base of the sequence-number table.
//   l2_rd_*             L2 read miss: physical and virtual line address and
//                       class; the plaintext line comes back on
//                       l2_rd_resp_valid/l2_rd_resp_data (no back-pressure).
//   l2_wb_*             L2 write-back of a dirty line (plaintext).
//   mem_req_*/mem_rsp_* main memory: line (1024-bit) or word (64-bit, in
//                       bits [63:0]) reads and writes; read data returns in
//                       order on mem_rsp_valid.
//   events              one-cycle flags for each mechanism, for counting.
// Timing: a read whose sequence number is in the snc (and every code read)
// returns exactly memory latency + 1 cycles after it is accepted; an snc
// miss adds the fetch and deciphering of the number (about 120 cycles more).
//
// Following the published scheme: the pad equation, the seed (block virtual
// address + sequence number), the sequence-number update (old + timer, 0 on
// the first write), the snc size and LRU policy, the handling of snc misses
// with direct encryption of evicted numbers, and the 50-cycle pipelined
// cipher. This design's own choices: the request classes, the layout and
// location of sequence numbers in memory, the one-operation-at-a-time
// controller with read priority, the write-buffer hazard checks and all
// handshakes.
module otp_secure_mem
  import otp_pkg::*;
#(
  parameter int unsigned SNC_SIZE   = SNC_ENTRIES,  // sequence numbers held
  parameter int unsigned SNC_WAYS   = SNC_ENTRIES,  // = SNC_SIZE: fully associative
  parameter int unsigned CIPHER_LAT = CRYPTO_LAT,
  parameter int unsigned WB_DEPTH   = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            key_we,
  input  logic [63:0]     key_i,
  input  logic [PA_W-1:0] seq_base,
  // L2 read misses
  input  logic            l2_rd_valid,
  output logic            l2_rd_ready,
  input  logic [PA_W-1:0] l2_rd_pa,
  input  logic [VA_W-1:0] l2_rd_va,
  input  req_kind_e       l2_rd_kind,
  output logic            l2_rd_resp_valid,
  output line_t           l2_rd_resp_data,
  // L2 write-backs
  input  logic            l2_wb_valid,
  output logic            l2_wb_ready,
  input  logic [PA_W-1:0] l2_wb_pa,
  input  logic [VA_W-1:0] l2_wb_va,
  input  req_kind_e       l2_wb_kind,
  input  line_t           l2_wb_data,
  // main memory
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output logic            mem_req_we,
  output logic            mem_req_word,
  output logic [PA_W-1:0] mem_req_addr,
  output line_t           mem_req_wdata,
  input  logic            mem_rsp_valid,
  input  line_t           mem_rsp_rdata,
  output otp_events_t     events
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_SEQRD, S_SEQWAIT, S_SEQDEC, S_RD_WAIT, S_RD_PLAIN,
    S_WR_WAIT, S_WR_MEM, S_INSERT, S_VICTIM, S_SQ_ENC, S_SQ_WAIT, S_SQ_MEM
  } state_e;

  state_e          state_q, state_n;
  logic            wr_op_q;          // current operation is a write-back
  logic            miss_q;           // current operation missed in the snc
  ltag_t           tag_q;            // virtual line number of the operation
  logic [PA_W-1:0] pa_q;
  seq_t            seq_q;            // sequence number used for the pads
  line_t           wdata_q;          // line to write to memory
  logic            line_pend_q;      // a line read is outstanding
  logic [63:0]     sqword_q;         // enciphered sequence-number word

  // ---------------------------------------------------------------- blocks
  logic [SEQ_W-1:0] timer;
  system_timer u_timer (.clk, .rst_n, .value(timer));

  logic     sg_start, sg_busy, sg_valid;
  logic [VA_W-1:0] sg_va;           // a code read starts its seeds on accept
  assign sg_va = (state_q == S_IDLE) ? l2_rd_va : {tag_q, {LINE_OFF_W{1'b0}}};
  seq_t     sg_seq;
  eng_dst_e sg_dst;
  logic [63:0] sg_seed;
  eng_tag_t    sg_tag;
  seed_gen u_seed (
    .clk, .rst_n, .start(sg_start), .line_va(sg_va),
    .seq(sg_seq), .dst(sg_dst), .busy(sg_busy), .out_valid(sg_valid),
    .out_seed(sg_seed), .out_tag(sg_tag)
  );

  localparam eng_tag_t SEQ_TAG = '{dst: DST_SEQ, blk: '0};

  logic        fe_valid, fe_decrypt;  // controller's own cipher input
  logic [63:0] fe_block;
  logic        eng_out_valid;
  logic [63:0] eng_out_block;
  eng_tag_t    eng_out_tag;
  logic [$bits(eng_tag_t)-1:0] eng_out_tag_raw;
  crypto_engine #(.LAT(CIPHER_LAT), .TAG_W($bits(eng_tag_t))) u_engine (
    .clk, .rst_n, .key_we, .key_i,
    .in_valid  (sg_valid | fe_valid),
    .in_decrypt(sg_valid ? 1'b0 : fe_decrypt),
    .in_block  (sg_valid ? sg_seed : fe_block),
    .in_tag    (sg_valid ? sg_tag : SEQ_TAG),
    .out_valid (eng_out_valid),
    .out_block (eng_out_block),
    .out_tag   (eng_out_tag_raw)
  );
  assign eng_out_tag = eng_tag_t'(eng_out_tag_raw);

  logic eng_seq_out;
  assign eng_seq_out = eng_out_valid && eng_out_tag.dst == DST_SEQ;

  logic snc_req_valid;
  snc_op_e snc_req_op;
  seq_t snc_req_seq;
  logic snc_rsp_valid, snc_rsp_hit, snc_vic_valid;
  seq_t snc_rsp_seq, snc_vic_seq;
  ltag_t snc_req_tag, snc_vic_tag;
  snc #(.ENTRIES(SNC_SIZE), .WAYS(SNC_WAYS)) u_snc (
    .clk, .rst_n, .req_valid(snc_req_valid), .req_op(snc_req_op),
    .req_tag(snc_req_tag), .req_seq(snc_req_seq),
    .rsp_valid(snc_rsp_valid), .rsp_hit(snc_rsp_hit), .rsp_seq(snc_rsp_seq),
    .rsp_victim_valid(snc_vic_valid), .rsp_victim_tag(snc_vic_tag),
    .rsp_victim_seq(snc_vic_seq)
  );

  logic rx_clear, rx_line_valid, rx_done;
  line_t rx_result;
  otp_line_xor u_rd_xor (
    .clk, .rst_n, .clear(rx_clear),
    .pad_valid(eng_out_valid && eng_out_tag.dst == DST_RD_PAD),
    .pad_blk(eng_out_tag.blk), .pad(eng_out_block),
    .line_valid(rx_line_valid), .line_i(mem_rsp_rdata),
    .done(rx_done), .result(rx_result)
  );

  logic wx_clear, wx_line_valid, wx_done;
  line_t wx_result;
  otp_line_xor u_wr_xor (
    .clk, .rst_n, .clear(wx_clear),
    .pad_valid(eng_out_valid && eng_out_tag.dst == DST_WR_PAD),
    .pad_blk(eng_out_tag.blk), .pad(eng_out_block),
    .line_valid(wx_line_valid), .line_i(wdata_q),
    .done(wx_done), .result(wx_result)
  );

  logic wb_push, wb_pop, wb_empty, wb_full, wb_line_match, wb_seq_match;
  logic fsm_push;
  wb_entry_t wb_push_entry, wb_head, fsm_entry;
  logic [$clog2(WB_DEPTH):0] wb_count;
  seq_t wb_seq_val;
  write_buffer #(.DEPTH(WB_DEPTH)) u_wb (
    .clk, .rst_n, .push_valid(wb_push), .push_entry(wb_push_entry),
    .pop(wb_pop), .head_entry(wb_head), .empty(wb_empty), .full(wb_full),
    .count(wb_count), .srch_pa(l2_rd_pa), .srch_tag(tag_q),
    .line_match(wb_line_match), .seq_match(wb_seq_match), .seq_match_val(wb_seq_val)
  );

  // One slot is kept free for a sequence number evicted by the controller.
  assign l2_wb_ready   = !fsm_push && (wb_count < ($clog2(WB_DEPTH)+1)'(WB_DEPTH - 1));
  assign wb_push       = fsm_push || (l2_wb_valid && l2_wb_ready);
  assign wb_push_entry = fsm_push ? fsm_entry :
                         '{kind: WB_LINE, cls: l2_wb_kind, pa: l2_wb_pa, va: l2_wb_va,
                           seq: '0, data: l2_wb_data};
  assign fsm_entry     = '{kind: WB_SEQ, cls: REQ_DATA, pa: '0,
                           va: {snc_vic_tag, {LINE_OFF_W{1'b0}}}, seq: snc_vic_seq, data: '0};

  // Decoding a deciphered sequence-number word.
  seq_word_t dec_word;
  logic      dec_ok;
  assign dec_word = seq_word_t'(eng_out_block);
  assign dec_ok   = dec_word.valid && dec_word.zero == '0 && dec_word.tag == tag_q;

  // Sequence-number word to be enciphered for memory.
  seq_word_t enc_word;
  assign enc_word = '{valid: 1'b1, zero: '0, tag: tag_q, seq: seq_q};

  logic [PA_W-1:0] seq_addr;
  assign seq_addr = seq_base + PA_W'({tag_q, 3'b000});

  logic [PA_W-1:0] rd_line_addr;
  assign rd_line_addr = {l2_rd_pa[PA_W-1:LINE_OFF_W], {LINE_OFF_W{1'b0}}};

  // ------------------------------------------------------------ controller
  logic  rd_accept, seq_rsp;
  seq_t  seq_n;
  logic  seq_we;

  // A read needs a free write-buffer slot for the number it may evict.
  assign l2_rd_ready = state_q == S_IDLE && !wb_line_match && !wb_full && mem_req_ready;
  assign rd_accept   = l2_rd_valid && l2_rd_ready;
  // A response that is not the outstanding line is the sequence-number word.
  assign seq_rsp       = mem_rsp_valid && !line_pend_q;
  assign rx_line_valid = mem_rsp_valid && line_pend_q && state_q != S_RD_PLAIN;

  always_comb begin
    state_n       = state_q;
    sg_start      = 1'b0;
    sg_seq        = seq_q;
    sg_dst        = wr_op_q ? DST_WR_PAD : DST_RD_PAD;
    fe_valid      = 1'b0;
    fe_decrypt    = 1'b1;
    fe_block      = mem_rsp_rdata[63:0];
    snc_req_valid = 1'b0;
    snc_req_op    = SNC_LOOKUP;
    snc_req_tag   = tag_q;
    snc_req_seq   = seq_q;
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_word  = 1'b0;
    mem_req_addr  = rd_line_addr;
    mem_req_wdata = wdata_q;
    l2_rd_resp_valid = 1'b0;
    l2_rd_resp_data  = rx_result;
    rx_clear      = 1'b0;
    wx_clear      = 1'b0;
    wx_line_valid = 1'b0;
    wb_pop        = 1'b0;
    fsm_push      = 1'b0;
    seq_n         = seq_q;
    seq_we        = 1'b0;
    events        = '0;

    unique case (state_q)
      S_IDLE: begin
        if (l2_rd_valid && l2_rd_ready) begin
          mem_req_valid = 1'b1;                       // line read starts at once
          unique case (l2_rd_kind)
            REQ_PLAIN: state_n = S_RD_PLAIN;
            REQ_INSTR: begin
              sg_start = 1'b1;                        // seed = block address
              sg_seq   = '0;
              sg_dst   = DST_RD_PAD;
              seq_n    = '0;
              seq_we   = 1'b1;
              events.instr_read = 1'b1;
              state_n  = S_RD_WAIT;
            end
            default: begin
              snc_req_valid = 1'b1;
              snc_req_op    = SNC_LOOKUP;
              snc_req_tag   = l2_rd_va[VA_W-1:LINE_OFF_W];
              state_n       = S_LOOKUP;
            end
          endcase
        end else if (!wb_empty) begin
          wb_pop = 1'b1;
          events.raw_drain = l2_rd_valid && wb_line_match;
          if (wb_head.kind == WB_SEQ) begin
            state_n = S_SQ_ENC;
          end else if (wb_head.cls == REQ_PLAIN) begin
            events.plain_write = 1'b1;
            state_n = S_WR_MEM;
          end else begin
            snc_req_valid = 1'b1;
            snc_req_op    = SNC_LOOKUP;
            snc_req_tag   = wb_head.va[VA_W-1:LINE_OFF_W];
            state_n       = S_LOOKUP;
          end
        end
      end

      S_LOOKUP: begin
        if (snc_rsp_hit) begin
          seq_n  = wr_op_q ? snc_rsp_seq + timer : snc_rsp_seq;   // eq. (4)
          seq_we = 1'b1;
          events.query_hit  = !wr_op_q;
          events.update_hit = wr_op_q;
          if (wr_op_q) begin
            snc_req_valid = 1'b1;
            snc_req_op    = SNC_UPDATE;
            snc_req_seq   = seq_n;
          end
          sg_start = 1'b1;
          sg_seq   = seq_n;
          state_n  = wr_op_q ? S_WR_WAIT : S_RD_WAIT;
        end else begin
          events.query_miss  = !wr_op_q;
          events.update_miss = wr_op_q;
          if (wb_seq_match) begin
            // The line's number is still waiting in the write buffer.
            events.seq_forward = 1'b1;
            seq_n    = wr_op_q ? wb_seq_val + timer : wb_seq_val;
            seq_we   = 1'b1;
            sg_start = 1'b1;
            sg_seq   = seq_n;
            state_n  = wr_op_q ? S_WR_WAIT : S_RD_WAIT;
          end else begin
            state_n = S_SEQRD;
          end
        end
      end

      S_SEQRD: begin
        mem_req_valid = 1'b1;
        mem_req_word  = 1'b1;
        mem_req_addr  = seq_addr;
        if (mem_req_ready) state_n = S_SEQWAIT;
      end

      S_SEQWAIT: begin
        if (seq_rsp) begin
          fe_valid   = 1'b1;                          // Decrypt_KEY(sn)
          fe_decrypt = 1'b1;
          fe_block   = mem_rsp_rdata[63:0];
          state_n    = S_SEQDEC;
        end
      end

      S_SEQDEC: begin
        if (eng_seq_out) begin
          // A word that does not decode for this line was never written:
          // the line is on its first write (seq_1 = 0) or was never enciphered
          // with a sequence number (pad seeded by the address alone).
          events.first_write = wr_op_q && !dec_ok;
          if (!dec_ok)      seq_n = '0;
          else if (wr_op_q) seq_n = dec_word.seq + timer;
          else              seq_n = dec_word.seq;
          seq_we   = 1'b1;
          sg_start = 1'b1;
          sg_seq   = seq_n;
          state_n  = wr_op_q ? S_WR_WAIT : S_RD_WAIT;
        end
      end

      S_RD_WAIT: begin
        if (rx_done) begin
          l2_rd_resp_valid = 1'b1;
          rx_clear         = 1'b1;
          state_n          = miss_q ? S_INSERT : S_IDLE;
        end
      end

      S_RD_PLAIN: begin
        if (mem_rsp_valid) begin
          l2_rd_resp_valid = 1'b1;
          l2_rd_resp_data  = mem_rsp_rdata;
          events.plain_read = 1'b1;
          state_n          = S_IDLE;
        end
      end

      S_WR_WAIT: begin
        wx_line_valid = 1'b1;
        if (wx_done) begin
          wx_clear = 1'b1;
          state_n  = S_WR_MEM;
        end
      end

      S_WR_MEM: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = {pa_q[PA_W-1:LINE_OFF_W], {LINE_OFF_W{1'b0}}};
        mem_req_wdata = wdata_q;
        if (mem_req_ready) state_n = miss_q ? S_INSERT : S_IDLE;
      end

      S_INSERT: begin
        snc_req_valid = 1'b1;
        snc_req_op    = SNC_INSERT;
        snc_req_seq   = seq_q;
        state_n       = S_VICTIM;
      end

      S_VICTIM: begin
        if (snc_vic_valid) begin
          fsm_push         = 1'b1;                    // encrypted later
          events.snc_evict = 1'b1;
        end
        state_n = S_IDLE;
      end

      S_SQ_ENC: begin
        fe_valid   = 1'b1;                            // direct encryption
        fe_decrypt = 1'b0;
        fe_block   = enc_word;
        state_n    = S_SQ_WAIT;
      end

      S_SQ_WAIT: begin
        if (eng_seq_out) state_n = S_SQ_MEM;
      end

      S_SQ_MEM: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_word  = 1'b1;
        mem_req_addr  = seq_addr;
        mem_req_wdata = line_t'(sqword_q);
        if (mem_req_ready) begin
          events.seq_writeback = 1'b1;
          state_n = S_IDLE;
        end
      end

      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      wr_op_q     <= 1'b0;
      miss_q      <= 1'b0;
      tag_q       <= '0;
      pa_q        <= '0;
      seq_q       <= '0;
      line_pend_q <= 1'b0;
      sqword_q    <= '0;
      wdata_q     <= '0;
    end else begin
      state_q <= state_n;
      if (seq_we) seq_q <= seq_n;
      if (state_q == S_LOOKUP && !snc_rsp_hit) miss_q <= 1'b1;
      if (rd_accept) begin
        wr_op_q     <= 1'b0;
        miss_q      <= 1'b0;
        tag_q       <= l2_rd_va[VA_W-1:LINE_OFF_W];
        pa_q        <= l2_rd_pa;
        line_pend_q <= l2_rd_kind != REQ_PLAIN;
      end else if (wb_pop) begin
        wr_op_q <= 1'b1;
        miss_q  <= 1'b0;
        tag_q   <= wb_head.va[VA_W-1:LINE_OFF_W];
        pa_q    <= wb_head.pa;
        wdata_q <= wb_head.data;
        if (wb_head.kind == WB_SEQ) seq_q <= wb_head.seq;
      end else if (rx_line_valid) begin
        line_pend_q <= 1'b0;
      end
      if (state_q == S_WR_WAIT && wx_done) wdata_q <= wx_result;
      if (state_q == S_SQ_WAIT && eng_seq_out) sqword_q <= eng_out_block;
    end
  end

  // The controller's own cipher use never overlaps a seed stream.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !(sg_valid && fe_valid))
    else $error("cipher input collision");

  // A seed stream is only started when the generator is free.
  a_seed_free: assert property (@(posedge clk) disable iff (!rst_n) !(sg_start && sg_busy))
    else $error("seed generator restarted while busy");

  // The write buffer never overflows.
  a_wb_room: assert property (@(posedge clk) disable iff (!rst_n) !(wb_push && wb_full))
    else $error("write buffer overflow");

endmodule
