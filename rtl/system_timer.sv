// system_timer: free-running cycle counter that mutates sequence numbers.
//
// Each time a data line goes to memory its sequence number becomes the old
// number plus the current timer value, so that repeated writes of one line
// use unrelated pads. The timer is SEQ_W (16) bits wide, wraps, and counts
// one per clock from reset; width, rate and reset value are this design's
// choices. value is the registered count.
module system_timer
  import otp_pkg::*;
#(
  parameter int unsigned W = SEQ_W
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] value
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) value <= W'(1);
    else        value <= value + 1'b1;
  end

endmodule
