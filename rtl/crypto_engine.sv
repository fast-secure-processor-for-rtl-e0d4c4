// crypto_engine: fully pipelined DES encryption/decryption unit.
//
// One 64-bit block can enter every cycle and leaves exactly LAT cycles later,
// so the engine can work on all sixteen seeds of a 128-byte line while the
// line itself is still on its way from memory. The 16 Feistel rounds occupy
// the first 16 pipeline stages (one round per stage, the initial permutation
// folded into stage 1 and the final one into stage 16); the remaining LAT-16
// stages only delay the result so that the unit has the 50-cycle latency
// the evaluation assumes. That split is this design's choice: the latency
// and the full pipelining are what the scheme relies on.
//
// The key is written through key_we/key_i; its 16 round keys are computed
// and stored on that write. Each block carries a decrypt flag and a tag
// that comes out with it. There is no back-pressure: whoever issues a block
// must accept its result LAT cycles later.
module crypto_engine
  import des_pkg::*;
#(
  parameter int unsigned LAT   = 50,
  parameter int unsigned TAG_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              key_we,
  input  logic [63:0]       key_i,
  input  logic              in_valid,
  input  logic              in_decrypt,
  input  logic [63:0]       in_block,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [63:0]       out_block,
  output logic [TAG_W-1:0]  out_tag
);

  localparam int unsigned ROUNDS = 16;
  localparam int unsigned DLY    = LAT - ROUNDS;

  initial assert (LAT >= ROUNDS) else $fatal(1, "crypto_engine: LAT must be at least 16");

  subkeys_t subkeys_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      subkeys_q <= '0;
    else if (key_we) subkeys_q <= des_key_schedule(key_i);
  end

  // Round stages.
  logic [ROUNDS-1:0] rv_q, rd_q;
  logic [63:0]       rlr_q  [ROUNDS];
  logic [TAG_W-1:0]  rtag_q [ROUNDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rv_q <= '0;
    end else begin
      rv_q <= {rv_q[ROUNDS-2:0], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    rd_q[0]   <= in_decrypt;
    rtag_q[0] <= in_tag;
    rlr_q[0]  <= des_round(des_ip(in_block), in_decrypt ? subkeys_q[ROUNDS-1] : subkeys_q[0]);
    for (int s = 1; s < ROUNDS; s++) begin
      rd_q[s]   <= rd_q[s-1];
      rtag_q[s] <= rtag_q[s-1];
      rlr_q[s]  <= des_round(rlr_q[s-1], rd_q[s-1] ? subkeys_q[ROUNDS-1-s] : subkeys_q[s]);
    end
  end

  logic [63:0] round_out;
  assign round_out = des_fp({rlr_q[ROUNDS-1][31:0], rlr_q[ROUNDS-1][63:32]});

  // Delay stages up to the full latency.
  if (DLY == 0) begin : g_nodelay
    assign out_valid = rv_q[ROUNDS-1];
    assign out_block = round_out;
    assign out_tag   = rtag_q[ROUNDS-1];
  end else begin : g_delay
    logic [DLY-1:0]   dv_q;
    logic [63:0]      dblk_q [DLY];
    logic [TAG_W-1:0] dtag_q [DLY];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dv_q <= '0;
      end else begin
        dv_q[0] <= rv_q[ROUNDS-1];
        for (int s = 1; s < DLY; s++) dv_q[s] <= dv_q[s-1];
      end
    end

    always_ff @(posedge clk) begin
      dblk_q[0] <= round_out;
      dtag_q[0] <= rtag_q[ROUNDS-1];
      for (int s = 1; s < DLY; s++) begin
        dblk_q[s] <= dblk_q[s-1];
        dtag_q[s] <= dtag_q[s-1];
      end
    end

    assign out_valid = dv_q[DLY-1];
    assign out_block = dblk_q[DLY-1];
    assign out_tag   = dtag_q[DLY-1];
  end

endmodule
