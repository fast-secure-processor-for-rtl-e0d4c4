// seed_gen: streams the sixteen cipher seeds of one L2 line.
//
// A 128-byte line is sixteen 64-bit cipher blocks. The seed of block b is
// the virtual address of that block plus the line's sequence number,
// seed = (line_va + 8*b) + seq, so that every block of every line, and
// every rewrite of a line, gets its own pad. For code the sequence number
// is 0 and the seed is the block address alone. The adder is 64 bits wide
// and the address and sequence number are zero-extended.
//
// start (with line_va, seq and dst) is taken when busy is low; from the next
// cycle one seed per cycle is presented on out_valid/out_seed for BLKS
// cycles, tagged with the destination and block index for the cipher.
module seed_gen
  import otp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [VA_W-1:0] line_va,
  input  seq_t            seq,
  input  eng_dst_e        dst,
  output logic            busy,
  output logic            out_valid,
  output logic [63:0]     out_seed,
  output eng_tag_t        out_tag
);

  logic                 act_q;
  logic [BLK_IDX_W-1:0] blk_q;
  logic [VA_W-1:0]      va_q;
  seq_t                 seq_q;
  eng_dst_e             dst_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q <= 1'b0;
      blk_q <= '0;
      va_q  <= '0;
      seq_q <= '0;
      dst_q <= DST_RD_PAD;
    end else if (start && !act_q) begin
      act_q <= 1'b1;
      blk_q <= '0;
      va_q  <= {line_va[VA_W-1:LINE_OFF_W], {LINE_OFF_W{1'b0}}};
      seq_q <= seq;
      dst_q <= dst;
    end else if (act_q) begin
      blk_q <= blk_q + 1'b1;
      if (blk_q == BLK_IDX_W'(BLKS - 1)) act_q <= 1'b0;
    end
  end

  logic [VA_W-1:0] blk_va;
  assign blk_va = va_q + VA_W'({blk_q, 3'b000});

  assign busy      = act_q;
  assign out_valid = act_q;
  assign out_seed  = 64'(blk_va) + 64'(seq_q);
  assign out_tag   = '{dst: dst_q, blk: blk_q};

endmodule
