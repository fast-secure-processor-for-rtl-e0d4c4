// tb_otp_line_xor: checks the one-time-pad combiner.
//
// Lines and their sixteen pads are delivered in random order and with random
// gaps, the line sometimes before, sometimes after, sometimes in the same
// cycle as the last pad. done must rise exactly one cycle after the last
// piece arrived, result must be line XOR pads, and both must hold until
// clear. Applying the same pads to the result must give the line back.
module tb_otp_line_xor;
  import otp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, pad_valid = 1'b0, line_valid = 1'b0;
  logic [BLK_IDX_W-1:0] pad_blk = '0;
  logic [63:0] pad = '0;
  line_t line_i = '0;
  logic done;
  line_t result;

  otp_line_xor dut (.clk, .rst_n, .clear, .pad_valid, .pad_blk, .pad, .line_valid, .line_i,
                    .done, .result);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_line(input line_t ln, input logic [63:0] pads [BLKS], output line_t res);
    int order [BLKS];
    int line_at;
    for (int i = 0; i < BLKS; i++) order[i] = i;
    order.shuffle();
    line_at = $urandom_range(0, BLKS);   // BLKS: with the last pad
    for (int i = 0; i <= BLKS; i++) begin
      @(negedge clk);
      pad_valid  = (i < BLKS);
      pad_blk    = (i < BLKS) ? BLK_IDX_W'(order[i]) : '0;
      pad        = (i < BLKS) ? pads[order[i]] : '0;
      line_valid = (i == line_at) || (line_at == BLKS && i == BLKS - 1);
      line_i     = ln;
      if (i == BLKS) begin
        pad_valid  = 1'b0;
        line_valid = 1'b0;
        break;
      end
      checks++;
      if (done) begin failures++; $display("FAIL done early"); end
    end
    // the last piece went in at the previous edge: done is visible now
    #1;
    checks++;
    if (!done) begin failures++; $display("FAIL done late"); end
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      checks++;
      if (!done) begin failures++; $display("FAIL done dropped"); end
    end
    res = result;
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    checks++;
    if (done) begin failures++; $display("FAIL done not cleared"); end
  endtask

  initial begin
    line_t ln, exp, c, p;
    logic [63:0] pads [BLKS];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      for (int w = 0; w < LINE_W / 32; w++) ln[w*32 +: 32] = $urandom;
      exp = ln;
      for (int b = 0; b < BLKS; b++) begin
        pads[b] = {$urandom, $urandom};
        exp[b*64 +: 64] ^= pads[b];
      end
      run_line(ln, pads, c);
      checks++;
      if (c != exp) begin failures++; $display("FAIL ciphertext mismatch in line %0d", n); end
      run_line(c, pads, p);
      checks++;
      if (p != ln) begin failures++; $display("FAIL round trip mismatch in line %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
