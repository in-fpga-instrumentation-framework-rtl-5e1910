// tb_ocl_pipe: random writer and reader on an OpenCL pipe.  A queue model
// checks order and contents, that the pipe reports full after DEPTH words
// and empty after the last read, and that a word is readable only from the
// cycle after it was written.
module tb_ocl_pipe;

  localparam int unsigned W = 32, DEPTH = 8;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  int           checks = 0, failures = 0, n_full = 0, n_empty_wait = 0;
  logic [W-1:0] q[$];

  always #5 clk = ~clk;

  ocl_pipe #(.W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data)
  );

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 8000; k++) begin
      @(negedge clk);
      in_valid  = ((k / 300) % 2 == 0) ? (($urandom % 4) != 0) : (($urandom % 4) == 0);
      out_ready = ((k / 300) % 2 == 0) ? (($urandom % 3) == 0) : (($urandom % 3) != 0);
      in_data   = $urandom;
      #1;
      checks++;
      if (in_ready != (q.size() < DEPTH)) begin failures++; $display("cycle %0d: in_ready %b with %0d", k, in_ready, q.size()); end
      checks++;
      if (out_valid != (q.size() > 0)) begin failures++; $display("cycle %0d: out_valid %b with %0d", k, out_valid, q.size()); end
      if (out_valid) begin
        checks++;
        if (out_data != q[0]) begin failures++; $display("cycle %0d: %h expected %h", k, out_data, q[0]); end
      end
      if (!in_ready && in_valid) n_full++;
      if (!out_valid && out_ready) n_empty_wait++;
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (n_full == 0 || n_empty_wait == 0) begin failures++; $display("full or empty stall never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
