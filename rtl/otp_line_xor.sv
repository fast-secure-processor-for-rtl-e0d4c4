// otp_line_xor: one-time-pad combiner for one L2 line.
//
// Ciphertext = plaintext XOR E_k(seed) and plaintext = ciphertext XOR
// E_k(seed): the same XOR serves both directions. The sixteen pads arrive
// from the cipher one block at a time (pad_valid/pad_blk/pad) and the line
// arrives whole (line_valid/line_i), in either order. In the cycle after the
// last of the seventeen pieces has arrived, done rises and result holds the
// XOR: the single extra cycle that the scheme adds to a memory read. done
// and result stay until clear, which also empties the combiner for the next
// line (clear wins over pieces arriving in the same cycle).
module otp_line_xor
  import otp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 pad_valid,
  input  logic [BLK_IDX_W-1:0] pad_blk,
  input  logic [63:0]          pad,
  input  logic                 line_valid,
  input  line_t                line_i,
  output logic                 done,
  output line_t                result
);

  logic [BLKS-1:0] mask_q, mask_n;
  line_t           pads_q, pads_n, line_q, line_n;
  logic            have_q, have_n;

  always_comb begin
    mask_n = mask_q;
    pads_n = pads_q;
    have_n = have_q;
    line_n = line_q;
    if (pad_valid) begin
      mask_n[pad_blk]       = 1'b1;
      pads_n[pad_blk*64 +: 64] = pad;
    end
    if (line_valid) begin
      have_n = 1'b1;
      line_n = line_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q <= '0;
      have_q <= 1'b0;
      done   <= 1'b0;
    end else if (clear) begin
      mask_q <= '0;
      have_q <= 1'b0;
      done   <= 1'b0;
    end else begin
      mask_q <= mask_n;
      have_q <= have_n;
      if (&mask_n && have_n) done <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    pads_q <= pads_n;
    line_q <= line_n;
    if (!clear && !done && &mask_n && have_n) result <= line_n ^ pads_n;
  end

endmodule
