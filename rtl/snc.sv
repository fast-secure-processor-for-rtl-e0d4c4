// snc: sequence number cache.
//
// Holds the sequence number of each L2 line that has gone off chip, so that
// the pad seed (line virtual address + sequence number) is known as soon as
// an L2 miss is seen. It is tagged with the line's virtual address (the
// 41-bit line number of a 48-bit address), holds ENTRIES 16-bit numbers
// (64 KB, 32K numbers by default) and is fully associative (WAYS = ENTRIES)
// with least-recently-used replacement, the configuration the scheme is
// evaluated with; WAYS = 32 gives the 32-way set-associative variant, whose
// set is taken from the low bits of the line number.
//
// LRU is kept as an age per way: ages within a set are a permutation of
// 0..WAYS-1, a touched way gets age 0 and every younger way ages by one, and
// the victim is the first invalid way or else the way of age WAYS-1. This
// ageing scheme is this design's choice; the replacement order it gives is
// exact LRU.
//
// Interface: one request per cycle (req_valid, req_op, req_tag, req_seq); its
// result appears on the rsp_* outputs one cycle later.
//   SNC_LOOKUP  rsp_hit/rsp_seq give the stored number; a hit counts as a use.
//   SNC_UPDATE  a present line gets req_seq and is touched; rsp_hit tells
//               whether it was present.
//   SNC_INSERT  the line is written (in place if present); if a valid entry
//               had to go, rsp_victim_* carry it so that it can be written to
//               memory.
module snc
  import otp_pkg::*;
#(
  parameter int unsigned ENTRIES  = SNC_ENTRIES,
  parameter int unsigned WAYS     = SNC_ENTRIES,
  parameter int unsigned TAG_W    = LTAG_W,
  parameter int unsigned SEQ_BITS = SEQ_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req_valid,
  input  snc_op_e             req_op,
  input  logic [TAG_W-1:0]    req_tag,
  input  logic [SEQ_BITS-1:0] req_seq,
  output logic                rsp_valid,
  output logic                rsp_hit,
  output logic [SEQ_BITS-1:0] rsp_seq,
  output logic                rsp_victim_valid,
  output logic [TAG_W-1:0]    rsp_victim_tag,
  output logic [SEQ_BITS-1:0] rsp_victim_seq
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  initial assert (SETS * WAYS == ENTRIES) else $fatal(1, "snc: WAYS must divide ENTRIES");

  logic                valid_q [SETS][WAYS];
  logic [WAY_W-1:0]    age_q   [SETS][WAYS];
  logic [TAG_W-1:0]    tag_q   [SETS][WAYS];
  logic [SEQ_BITS-1:0] seq_q   [SETS][WAYS];

  logic [SET_W-1:0] set;
  assign set = (SETS > 1) ? SET_W'(req_tag) : '0;

  // Associative search of the addressed set.
  logic             hit, has_inv;
  logic [WAY_W-1:0] hit_way, inv_way, lru_way, fill_way;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    has_inv = 1'b0;
    inv_way = '0;
    lru_way = '0;
    for (int unsigned i = 0; i < WAYS; i++) begin
      if (valid_q[set][i] && tag_q[set][i] == req_tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(i);
      end
      if (!valid_q[set][i] && !has_inv) begin
        has_inv = 1'b1;
        inv_way = WAY_W'(i);
      end
      if (age_q[set][i] == WAY_W'(WAYS - 1)) lru_way = WAY_W'(i);
    end
    fill_way = hit ? hit_way : (has_inv ? inv_way : lru_way);
  end

  // The way whose use this request records, if any.
  logic             touch;
  logic [WAY_W-1:0] touch_way;
  always_comb begin
    touch     = 1'b0;
    touch_way = hit_way;
    if (req_valid) begin
      unique case (req_op)
        SNC_LOOKUP, SNC_UPDATE: touch = hit;
        SNC_INSERT: begin
          touch     = 1'b1;
          touch_way = fill_way;
        end
        default: touch = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++)
        for (int unsigned i = 0; i < WAYS; i++) begin
          valid_q[s][i] <= 1'b0;
          age_q[s][i]   <= WAY_W'(i);
        end
    end else begin
      if (touch) begin
        for (int unsigned i = 0; i < WAYS; i++)
          if (age_q[set][i] < age_q[set][touch_way]) age_q[set][i] <= age_q[set][i] + 1'b1;
        age_q[set][touch_way] <= '0;
      end
      if (req_valid && req_op == SNC_INSERT) valid_q[set][fill_way] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (req_valid && req_op == SNC_INSERT) begin
      tag_q[set][fill_way] <= req_tag;
      seq_q[set][fill_way] <= req_seq;
    end else if (req_valid && req_op == SNC_UPDATE && hit) begin
      seq_q[set][hit_way] <= req_seq;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid        <= 1'b0;
      rsp_hit          <= 1'b0;
      rsp_seq          <= '0;
      rsp_victim_valid <= 1'b0;
      rsp_victim_tag   <= '0;
      rsp_victim_seq   <= '0;
    end else begin
      rsp_valid        <= req_valid;
      rsp_hit          <= req_valid && hit;
      rsp_seq          <= seq_q[set][hit_way];
      rsp_victim_valid <= req_valid && req_op == SNC_INSERT && !hit && !has_inv;
      rsp_victim_tag   <= tag_q[set][lru_way];
      rsp_victim_seq   <= seq_q[set][lru_way];
    end
  end

endmodule
