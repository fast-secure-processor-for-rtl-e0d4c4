// tb_mem_model: behavioural main memory for the testbenches.
//
// Untrusted off-chip memory with a fixed access latency (LAT cycles from the
// accepted request to the read data), pipelined and in order. Storage is a
// sparse array of 64-bit words; never-written words read as zero. A line
// request moves 16 words, a word request one (in data bits [63:0]). Writes
// take effect when accepted. req_ready drops at random (1 cycle in
// STALL_PCT percent) to exercise the handshake; stalls are counted.
// Testbenches preload and inspect contents with poke()/peek().
module tb_mem_model
  import otp_pkg::*;
#(
  parameter int unsigned LAT       = MEM_LAT,
  parameter int unsigned STALL_PCT = 10
) (
  input  logic            clk,
  input  logic            req_valid,
  output logic            req_ready,
  input  logic            req_we,
  input  logic            req_word,
  input  logic [PA_W-1:0] req_addr,
  input  line_t           req_wdata,
  output logic            rsp_valid,
  output line_t           rsp_rdata
);

  logic [63:0] words [logic [PA_W-1:0]];
  int unsigned cyc = 0;
  int unsigned stalls = 0;

  typedef struct { int unsigned due; line_t data; } rsp_t;
  rsp_t pend [$];

  initial begin
    req_ready = 1'b1;
    rsp_valid = 1'b0;
    rsp_rdata = '0;
  end

  function automatic logic [63:0] peek(input logic [PA_W-1:0] a);
    logic [PA_W-1:0] k = a >> 3;
    return words.exists(k) ? words[k] : 64'h0;
  endfunction

  function automatic void poke(input logic [PA_W-1:0] a, input logic [63:0] d);
    words[a >> 3] = d;
  endfunction

  function automatic line_t peek_line(input logic [PA_W-1:0] a);
    line_t l;
    for (int b = 0; b < BLKS; b++) l[b*64 +: 64] = peek(a + PA_W'(8 * b));
    return l;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rsp_valid <= 1'b0;
    if (pend.size() > 0 && pend[0].due <= cyc) begin
      rsp_valid <= 1'b1;
      rsp_rdata <= pend[0].data;
      void'(pend.pop_front());
    end
    if (req_valid && req_ready) begin
      if (req_we) begin
        if (req_word) poke(req_addr, req_wdata[63:0]);
        else for (int b = 0; b < BLKS; b++) poke(req_addr + PA_W'(8 * b), req_wdata[b*64 +: 64]);
      end else begin
        pend.push_back('{due: cyc + LAT - 1,
                         data: req_word ? line_t'(peek(req_addr)) : peek_line(req_addr)});
      end
    end
    req_ready <= ($urandom_range(1, 100) > STALL_PCT);
    if (req_valid && !req_ready) stalls <= stalls + 1;
  end

endmodule
