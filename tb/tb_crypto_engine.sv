// tb_crypto_engine: checks the pipelined DES unit.
//
// Loads two keys in turn and pushes blocks back to back: the two published
// DES known-answer vectors (FIPS test vectors, key 133457799BBCDFF1 and key
// 0E329232EA6D0D73), then random blocks in both directions, including a
// decryption of each ciphertext. Every result must appear exactly LAT cycles
// after its block went in, with its tag, and match the reference value.
module tb_crypto_engine;
  import des_pkg::*;

  localparam int unsigned LAT = 50;
  localparam int unsigned TAG_W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic key_we = 1'b0;
  logic [63:0] key = '0;
  logic in_valid = 1'b0, in_decrypt = 1'b0;
  logic [63:0] in_block = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic out_valid;
  logic [63:0] out_block;
  logic [TAG_W-1:0] out_tag;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  crypto_engine #(.LAT(LAT), .TAG_W(TAG_W)) dut (
    .clk, .rst_n, .key_we, .key_i(key), .in_valid, .in_decrypt, .in_block, .in_tag,
    .out_valid, .out_block, .out_tag
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  typedef struct { int unsigned c; logic [63:0] exp; logic [TAG_W-1:0] tag; } exp_t;
  exp_t q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", out_block);
      end else begin
        exp_t e;
        e = q.pop_front();
        if (out_block !== e.exp || out_tag !== e.tag || cyc != e.c + LAT) begin
          failures++;
          $display("FAIL got %h tag %0d at %0d, expected %h tag %0d at %0d",
                   out_block, out_tag, cyc, e.exp, e.tag, e.c + LAT);
        end
      end
    end
  end

  task automatic push(input logic [63:0] b, input logic dec, input logic [63:0] exp);
    @(negedge clk);
    in_valid   = 1'b1;
    in_decrypt = dec;
    in_block   = b;
    in_tag     = in_tag + 1'b1;
    q.push_back('{c: cyc, exp: exp, tag: in_tag});
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  task automatic load_key(input logic [63:0] k);
    @(negedge clk);
    in_valid = 1'b0;
    key_we = 1'b1;
    key = k;
    @(negedge clk);
    key_we = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] b, c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_key(64'h133457799BBCDFF1);
    push(64'h0123456789ABCDEF, 1'b0, 64'h85E813540F0AB405);
    push(64'h85E813540F0AB405, 1'b1, 64'h0123456789ABCDEF);
    for (int i = 0; i < 40; i++) begin
      b = {$urandom, $urandom};
      c = des_block(64'h133457799BBCDFF1, b, 1'b0);
      push(b, 1'b0, c);
      push(c, 1'b1, b);
    end
    idle(LAT + 5);
    load_key(64'h0E329232EA6D0D73);
    push(64'h8787878787878787, 1'b0, 64'h0000000000000000);
    idle(3);                                    // a gap in the stream
    push(64'h0000000000000000, 1'b1, 64'h8787878787878787);
    idle(LAT + 5);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
