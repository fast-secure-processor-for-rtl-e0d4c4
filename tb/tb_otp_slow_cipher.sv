// tb_otp_slow_cipher: read latency with a slow (102-cycle) cipher.
//
// The same controller with CIPHER_LAT = 102 and a 64-entry fully associative
// sequence number cache. Data lines are written and read back repeatedly and
// code lines are read. With the cipher off the critical path a read costs
// the longer of the memory access and the pad stream, not their sum: the 16th
// pad leaves the cipher 17 + 102 cycles after the miss is accepted, so a hit
// must return in 17 + CIPHER_LAT + 1 = 120 cycles, well below the
// 100 + 102 = 202 cycles of a cipher placed on the memory path. The run also
// repeats the check at the default 50-cycle latency, where the memory access
// dominates (101 cycles). Data must read back correctly throughout.
module tb_otp_slow_cipher;
  import otp_pkg::*;

  localparam logic [63:0] KEY = 64'h0123456789ABCDEF;
  localparam logic [PA_W-1:0] SEQ_BASE = 48'h0000_0080_0000;
  localparam int unsigned NLINES = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Two controllers side by side, one per cipher latency, each with its memory.
  logic        key_we = 1'b0;
  logic        rd_valid [2], rd_ready [2], resp_valid [2], wb_valid [2], wb_ready [2];
  logic [PA_W-1:0] rd_pa [2], wb_pa [2];
  logic [VA_W-1:0] rd_va [2], wb_va [2];
  req_kind_e   rd_kind [2];
  line_t       resp_data [2], wb_data [2];
  logic        mq_valid [2], mq_ready [2], mq_we [2], mq_word [2], mr_valid [2];
  logic [PA_W-1:0] mq_addr [2];
  line_t       mq_wdata [2], mr_rdata [2];
  otp_events_t ev [2];

  for (genvar g = 0; g < 2; g++) begin : g_sys
    localparam int unsigned LAT = (g == 0) ? 102 : 50;
    otp_secure_mem #(.SNC_SIZE(64), .SNC_WAYS(64), .CIPHER_LAT(LAT)) dut (
      .clk, .rst_n, .key_we, .key_i(KEY), .seq_base(SEQ_BASE),
      .l2_rd_valid(rd_valid[g]), .l2_rd_ready(rd_ready[g]), .l2_rd_pa(rd_pa[g]),
      .l2_rd_va(rd_va[g]), .l2_rd_kind(rd_kind[g]),
      .l2_rd_resp_valid(resp_valid[g]), .l2_rd_resp_data(resp_data[g]),
      .l2_wb_valid(wb_valid[g]), .l2_wb_ready(wb_ready[g]), .l2_wb_pa(wb_pa[g]),
      .l2_wb_va(wb_va[g]), .l2_wb_kind(REQ_DATA), .l2_wb_data(wb_data[g]),
      .mem_req_valid(mq_valid[g]), .mem_req_ready(mq_ready[g]), .mem_req_we(mq_we[g]),
      .mem_req_word(mq_word[g]), .mem_req_addr(mq_addr[g]), .mem_req_wdata(mq_wdata[g]),
      .mem_rsp_valid(mr_valid[g]), .mem_rsp_rdata(mr_rdata[g]), .events(ev[g])
    );
    tb_mem_model #(.LAT(MEM_LAT), .STALL_PCT(0)) mem (
      .clk, .req_valid(mq_valid[g]), .req_ready(mq_ready[g]), .req_we(mq_we[g]),
      .req_word(mq_word[g]), .req_addr(mq_addr[g]), .req_wdata(mq_wdata[g]),
      .rsp_valid(mr_valid[g]), .rsp_rdata(mr_rdata[g])
    );
  end

  function automatic line_t rand_line();
    line_t l;
    for (int w = 0; w < LINE_W / 32; w++) l[w*32 +: 32] = $urandom;
    return l;
  endfunction

  task automatic l2_write(input int g, input int i, input line_t d);
    @(negedge clk);
    wb_valid[g] = 1'b1;
    wb_va[g] = VA_W'(48'h0000_7000_0000) + VA_W'(128 * i);
    wb_pa[g] = PA_W'(48'h0000_0010_0000) + PA_W'(128 * i);
    wb_data[g] = d;
    #1;
    while (!wb_ready[g]) begin @(negedge clk); #1; end
    @(negedge clk);
    wb_valid[g] = 1'b0;
    repeat (500) @(negedge clk);
  endtask

  task automatic l2_read(input int g, input int i, output line_t d, output int unsigned lat);
    int unsigned t0;
    @(negedge clk);
    rd_valid[g] = 1'b1;
    rd_kind[g]  = REQ_DATA;
    rd_va[g] = VA_W'(48'h0000_7000_0000) + VA_W'(128 * i);
    rd_pa[g] = PA_W'(48'h0000_0010_0000) + PA_W'(128 * i);
    #1;
    while (!rd_ready[g]) begin @(negedge clk); #1; end
    t0 = cyc;
    @(negedge clk);
    rd_valid[g] = 1'b0;
    while (!resp_valid[g]) @(negedge clk);
    d = resp_data[g];
    lat = cyc - t0;
  endtask

  initial begin
    line_t data [NLINES];
    line_t got;
    int unsigned lat, expect_lat, worst [2];
    for (int g = 0; g < 2; g++) begin
      rd_valid[g] = 1'b0; wb_valid[g] = 1'b0; rd_pa[g] = '0; rd_va[g] = '0; rd_kind[g] = REQ_DATA;
      wb_pa[g] = '0; wb_va[g] = '0; wb_data[g] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); key_we = 1'b1;
    @(negedge clk); key_we = 1'b0;
    for (int g = 0; g < 2; g++) begin
      int unsigned clat;
      clat = (g == 0) ? 102 : 50;
      expect_lat = (MEM_LAT + 1 > 18 + clat) ? MEM_LAT + 1 : 18 + clat;
      worst[g] = 0;
      for (int round = 0; round < 3; round++) begin
        for (int i = 0; i < NLINES; i++) begin
          data[i] = rand_line();
          l2_write(g, i, data[i]);
        end
        for (int i = 0; i < NLINES; i++) begin
          l2_read(g, i, got, lat);
          checks++;
          if (got != data[i] || lat != expect_lat) begin
            failures++;
            $display("FAIL cipher %0d line %0d: data ok %b, %0d cycles, expected %0d",
                     clat, i, got == data[i], lat, expect_lat);
          end
          if (lat > worst[g]) worst[g] = lat;
        end
      end
      $display("cipher latency %0d: read hit %0d cycles (cipher on the memory path: %0d)",
               clat, worst[g], MEM_LAT + clat);
      checks++;
      if (worst[g] >= MEM_LAT + clat) begin
        failures++;
        $display("FAIL no gain over a serial cipher");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
