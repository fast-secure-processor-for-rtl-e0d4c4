// write_buffer: FIFO between the L2 cache and memory for outgoing traffic.
//
// Evicted L2 lines are parked here in plaintext; the controller pops them one
// at a time, enciphers them with a fresh pad and writes them to memory, so
// that the encryption happens off the read path. Sequence numbers evicted
// from the sequence number cache are pushed here too and are enciphered
// directly before they go to memory. DEPTH (8) is this design's choice.
//
// push_valid/push_entry add an entry (the pusher must check full); pop
// removes head_entry when not empty. Two search ports look at every stored
// entry in the same cycle so that reads see pending writes:
//   line_match  some stored line has the physical line address srch_pa;
//   seq_match   some stored sequence number belongs to line srch_tag, and
//               seq_match_val is the youngest such number.
// count is the number of stored entries.
module write_buffer
  import otp_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push_valid,
  input  wb_entry_t              push_entry,
  input  logic                   pop,
  output wb_entry_t              head_entry,
  output logic                   empty,
  output logic                   full,
  output logic [$clog2(DEPTH):0] count,
  input  logic [PA_W-1:0]        srch_pa,
  input  ltag_t                  srch_tag,
  output logic                   line_match,
  output logic                   seq_match,
  output seq_t                   seq_match_val
);

  localparam int unsigned PTR_W = $clog2(DEPTH);

  wb_entry_t        mem_q [DEPTH];
  logic [DEPTH-1:0] vld_q;
  logic [PTR_W-1:0] rd_q, wr_q;

  assign empty      = (count == '0);
  assign full       = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign head_entry = mem_q[rd_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      count <= '0;
      vld_q <= '0;
    end else begin
      if (push_valid && !full) begin
        wr_q        <= wr_q + 1'b1;
        vld_q[wr_q] <= 1'b1;
      end
      if (pop && !empty) begin
        rd_q        <= rd_q + 1'b1;
        vld_q[rd_q] <= 1'b0;
      end
      count <= count + (($clog2(DEPTH)+1)'(push_valid && !full))
                     - (($clog2(DEPTH)+1)'(pop && !empty));
    end
  end

  always_ff @(posedge clk) begin
    if (push_valid && !full) mem_q[wr_q] <= push_entry;
  end

  // Search, oldest to youngest so that the last match found is the youngest.
  always_comb begin
    logic [PTR_W-1:0] idx;
    line_match    = 1'b0;
    seq_match     = 1'b0;
    seq_match_val = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      idx = rd_q + PTR_W'(i);
      if (vld_q[idx]) begin
        if (mem_q[idx].kind == WB_LINE &&
            mem_q[idx].pa[PA_W-1:LINE_OFF_W] == srch_pa[PA_W-1:LINE_OFF_W])
          line_match = 1'b1;
        if (mem_q[idx].kind == WB_SEQ &&
            mem_q[idx].va[VA_W-1:LINE_OFF_W] == srch_tag) begin
          seq_match     = 1'b1;
          seq_match_val = mem_q[idx].seq;
        end
      end
    end
  end

endmodule
