// tb_ie_monitor: checks that the monitor timer counts clock edges from reset
// and wraps to zero after its wrap value (a second instance with a small
// wrap value makes the wrap reachable).
module tb_ie_monitor;
  import ie_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  ts_t  t_full;
  logic [31:0] t_small;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ie_monitor dut (.clk(clk), .rst_n(rst_n), .time_o(t_full));
  ie_monitor #(.TS_W(32), .WRAP_AT(32'd6)) dut_wrap (.clk(clk), .rst_n(rst_n), .time_o(t_small));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (t_full != 0 || t_small != 0) begin failures++; $display("not cleared by reset"); end
    rst_n = 1'b1;
    for (int k = 1; k <= 200; k++) begin
      @(negedge clk);
      checks++;
      if (t_full != ts_t'(k)) begin
        failures++; $display("cycle %0d: timer %0d", k, t_full);
      end
      checks++;
      if (t_small != 32'(k % 7)) begin
        failures++; $display("cycle %0d: wrapping timer %0d, expected %0d", k, t_small, k % 7);
      end
    end
    // asynchronous reset mid-run
    rst_n = 1'b0;
    #1;
    checks++;
    if (t_full != 0) begin failures++; $display("asynchronous reset ignored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
