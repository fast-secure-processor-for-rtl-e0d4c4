// otp_pkg: sizes, types and encodings shared by the one-time-pad memory
// encryption blocks.
//
// The numbers follow the evaluated configuration: 48-bit virtual addresses
// (the Alpha example), 128-byte L2 lines made of sixteen 64-bit cipher blocks,
// 2-byte sequence numbers, a 64 KB sequence number cache (32K numbers),
// 100-cycle memory and a 50-cycle cipher. Physical address width, the
// request classes and the layout of a sequence-number word kept in memory are
// choices of this design.
package otp_pkg;

  parameter int unsigned VA_W       = 48;   // virtual address bits
  parameter int unsigned PA_W       = 48;   // physical address bits (assumed)
  parameter int unsigned LINE_BYTES = 128;  // L2 line size
  parameter int unsigned BLK_BYTES  = 8;    // 64-bit cipher block
  parameter int unsigned BLKS       = LINE_BYTES / BLK_BYTES;  // 16 blocks per line
  parameter int unsigned BLK_IDX_W  = $clog2(BLKS);
  parameter int unsigned LINE_OFF_W = $clog2(LINE_BYTES);      // 7
  parameter int unsigned LINE_W     = LINE_BYTES * 8;          // 1024
  parameter int unsigned LTAG_W     = VA_W - LINE_OFF_W;       // 41-bit line tag
  parameter int unsigned SEQ_W      = 16;   // 2-byte sequence number
  parameter int unsigned SNC_ENTRIES = 32768; // 64 KB / 2 B
  parameter int unsigned MEM_LAT    = 100;  // memory latency in cycles
  parameter int unsigned CRYPTO_LAT = 50;   // cipher latency in cycles

  typedef logic [LINE_W-1:0] line_t;
  typedef logic [LTAG_W-1:0] ltag_t;
  typedef logic [SEQ_W-1:0]  seq_t;

  // Class of an L2 request. DATA lines use the sequence-number pad, INSTR
  // lines a pad seeded by their virtual address only (code is never written
  // back), PLAIN lines (shared libraries, program inputs, aliased segments)
  // bypass the cipher.
  typedef enum logic [1:0] {
    REQ_DATA  = 2'd0,
    REQ_INSTR = 2'd1,
    REQ_PLAIN = 2'd2
  } req_kind_e;

  // Where a cipher result goes.
  typedef enum logic [1:0] {
    DST_RD_PAD = 2'd0,   // pad for a line being read
    DST_WR_PAD = 2'd1,   // pad for a line being written
    DST_SEQ    = 2'd2    // sequence-number word (decrypted or encrypted)
  } eng_dst_e;

  typedef struct packed {
    eng_dst_e               dst;
    logic [BLK_IDX_W-1:0]   blk;
  } eng_tag_t;

  // A sequence number kept in memory is one directly enciphered 64-bit word:
  // {valid, 6'b0, line tag, sequence number}. The tag lets the controller
  // recognise a word that was never written for this line.
  typedef struct packed {
    logic        valid;
    logic [5:0]  zero;
    ltag_t       tag;
    seq_t        seq;
  } seq_word_t;

  // Operations of the sequence number cache.
  typedef enum logic [1:0] {
    SNC_LOOKUP = 2'd0,   // query: find the line's sequence number
    SNC_UPDATE = 2'd1,   // update hit: overwrite the number of a present line
    SNC_INSERT = 2'd2    // fill after a miss, evicting the LRU entry if full
  } snc_op_e;

  // Write-buffer entry: an evicted L2 line or an evicted sequence number.
  typedef enum logic {
    WB_LINE = 1'b0,
    WB_SEQ  = 1'b1
  } wb_kind_e;

  typedef struct packed {
    wb_kind_e            kind;
    req_kind_e           cls;    // for WB_LINE: DATA or PLAIN
    logic [PA_W-1:0]     pa;
    logic [VA_W-1:0]     va;     // for WB_SEQ only va[VA_W-1:LINE_OFF_W] is used
    seq_t                seq;
    line_t               data;
  } wb_entry_t;

  // One-cycle event flags reported by the controller.
  typedef struct packed {
    logic query_hit;
    logic query_miss;
    logic update_hit;
    logic update_miss;
    logic snc_evict;
    logic seq_writeback;
    logic seq_forward;
    logic first_write;
    logic raw_drain;
    logic instr_read;
    logic plain_read;
    logic plain_write;
  } otp_events_t;

endpackage
