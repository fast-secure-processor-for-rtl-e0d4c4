// tb_system_timer: the timer starts at 1 after reset, advances by one per
// clock, and wraps from all-ones to zero.
module tb_system_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] value;
  logic [3:0]  v4;

  system_timer dut (.clk, .rst_n, .value);
  system_timer #(.W(4)) dut4 (.clk, .rst_n, .value(v4));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, wraps = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n;
    repeat (3) @(negedge clk);
    checks++;
    if (value != 16'd1) begin failures++; $display("FAIL reset value %0d", value); end
    rst_n = 1'b1;
    n = 1;
    for (int i = 0; i < 70000; i++) begin
      @(negedge clk);
      n++;
      checks++;
      if (value != 16'(n) || v4 != 4'(n)) begin
        failures++;
        if (failures < 5) $display("FAIL cycle %0d value %0d v4 %0d", i, value, v4);
      end
      if (value == 16'd0) wraps++;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
