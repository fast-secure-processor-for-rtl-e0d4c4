// tb_otp_secure_mem_full: the controller at its default sizes (32K-entry
// fully associative sequence number cache, 50-cycle DES, 8-entry write
// buffer) against the 100-cycle memory, one operation at a time:
//   1. write-back of data line A (first write: snc update miss, the number
//      is fetched, found unwritten, and A is enciphered with number 0);
//   2. read of A: snc query hit, plaintext back after exactly 101 cycles;
//   3. second write-back of A with the same data: snc update hit, the
//      ciphertext in memory must change;
//   4. read of A again (101 cycles);
//   5. read of a line B that the loader left enciphered with the address
//      alone: snc query miss, at least 150 cycles, right plaintext;
//   6. read of B again, now a query hit;
//   7. a code read, checked against DES computed by the testbench;
//   8. a plain write-back and read.
module tb_otp_secure_mem_full;
  import otp_pkg::*;
  import des_pkg::*;

  localparam logic [63:0] KEY = 64'h133457799BBCDFF1;
  localparam logic [PA_W-1:0] SEQ_BASE = 48'h0000_0080_0000;

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

  otp_secure_mem dut (
    .clk, .rst_n, .key_we, .key_i(KEY), .seq_base(SEQ_BASE),
    .l2_rd_valid, .l2_rd_ready, .l2_rd_pa, .l2_rd_va, .l2_rd_kind,
    .l2_rd_resp_valid, .l2_rd_resp_data,
    .l2_wb_valid, .l2_wb_ready, .l2_wb_pa, .l2_wb_va, .l2_wb_kind, .l2_wb_data,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_word, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_rdata, .events(ev)
  );

  tb_mem_model #(.LAT(MEM_LAT), .STALL_PCT(0)) mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_word(mem_req_word), .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata)
  );

  localparam logic [VA_W-1:0] VA_A = 48'h0000_4000_1000, VA_B = 48'h0000_4000_2080;
  localparam logic [PA_W-1:0] PA_A = 48'h0000_0010_0300, PA_B = 48'h0000_0010_0080;
  localparam logic [VA_W-1:0] VA_C = 48'h0000_0040_0100;
  localparam logic [PA_W-1:0] PA_C = 48'h0000_0020_0100, PA_P = 48'h0000_0030_0000;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_qh, n_qm, n_uh, n_um, n_first, n_instr, n_plain;
  always @(posedge clk) if (rst_n) begin
    if (ev.query_hit)   n_qh++;
    if (ev.query_miss)  n_qm++;
    if (ev.update_hit)  n_uh++;
    if (ev.update_miss) n_um++;
    if (ev.first_write) n_first++;
    if (ev.instr_read)  n_instr++;
    if (ev.plain_read || ev.plain_write) n_plain++;
  end

  function automatic line_t rand_line();
    line_t l;
    for (int w = 0; w < LINE_W / 32; w++) l[w*32 +: 32] = $urandom;
    return l;
  endfunction

  function automatic line_t pad_of(logic [VA_W-1:0] va, seq_t s);
    line_t p;
    for (int b = 0; b < BLKS; b++) p[b*64 +: 64] = des_block(KEY, 64'(va) + 64'(8 * b) + 64'(s), 1'b0);
    return p;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic l2_read(input req_kind_e k, input logic [VA_W-1:0] va, input logic [PA_W-1:0] pa,
                         output line_t data, output int unsigned lat);
    int unsigned t0;
    @(negedge clk);
    l2_rd_valid = 1'b1; l2_rd_kind = k; l2_rd_va = va; l2_rd_pa = pa;
    #1;
    while (!l2_rd_ready) begin @(negedge clk); #1; end
    t0 = cyc;
    @(negedge clk);
    l2_rd_valid = 1'b0;
    while (!l2_rd_resp_valid) @(negedge clk);
    data = l2_rd_resp_data;
    lat  = cyc - t0;
    @(negedge clk);   // let the event counters see the response cycle
  endtask

  task automatic l2_write(input req_kind_e k, input logic [VA_W-1:0] va, input logic [PA_W-1:0] pa,
                          input line_t data);
    @(negedge clk);
    l2_wb_valid = 1'b1; l2_wb_kind = k; l2_wb_va = va; l2_wb_pa = pa; l2_wb_data = data;
    #1;
    while (!l2_wb_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    l2_wb_valid = 1'b0;
    // wait until the buffer has drained and the line is in memory
    repeat (400) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_t a, b, c, p, got, ct1, ct2;
    int unsigned lat;
    a = rand_line(); b = rand_line(); c = rand_line(); p = rand_line();
    for (int k = 0; k < BLKS; k++) begin
      mem.poke(PA_B + PA_W'(8 * k), b[k*64 +: 64] ^ pad_of(VA_B, '0)[k*64 +: 64]);
      mem.poke(PA_C + PA_W'(8 * k), c[k*64 +: 64] ^ pad_of(VA_C, '0)[k*64 +: 64]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); key_we = 1'b1;
    @(negedge clk); key_we = 1'b0;

    l2_write(REQ_DATA, VA_A, PA_A, a);                               // 1
    ct1 = mem.peek_line(PA_A);
    check(ct1 == (a ^ pad_of(VA_A, '0)), "first write not enciphered with number 0");
    check(n_um == 1 && n_first == 1, "first write not an update miss");

    l2_read(REQ_DATA, VA_A, PA_A, got, lat);                         // 2
    check(got == a, "read of A");
    check(lat == MEM_LAT + 1, $sformatf("hit read took %0d cycles", lat));

    l2_write(REQ_DATA, VA_A, PA_A, a);                               // 3
    ct2 = mem.peek_line(PA_A);
    check(n_uh == 1, "second write not an update hit");
    check(ct2 != ct1, "rewrite of the same data gave the same ciphertext");

    l2_read(REQ_DATA, VA_A, PA_A, got, lat);                         // 4
    check(got == a && lat == MEM_LAT + 1, "second read of A");
    check(n_qh == 2, "reads of A not query hits");

    l2_read(REQ_DATA, VA_B, PA_B, got, lat);                         // 5
    check(got == b, "read of B");
    check(n_qm == 1 && lat >= MEM_LAT + CRYPTO_LAT, $sformatf("miss read took %0d cycles", lat));

    l2_read(REQ_DATA, VA_B, PA_B, got, lat);                         // 6
    check(got == b && lat == MEM_LAT + 1 && n_qh == 3, "second read of B");

    l2_read(REQ_INSTR, VA_C, PA_C, got, lat);                        // 7
    check(got == c && lat == MEM_LAT + 1 && n_instr == 1, "code read");

    l2_write(REQ_PLAIN, PA_P, PA_P, p);                              // 8
    check(mem.peek_line(PA_P) == p, "plain write");
    l2_read(REQ_PLAIN, PA_P, PA_P, got, lat);
    check(got == p && n_plain == 2, $sformatf("plain read: data %b count %0d", got == p, n_plain));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
