// tb_trace_memory: writes more samples than the memory holds, at random
// moments, and reads every entry back: entry a must hold the last sample
// whose number is a modulo DEPTH, n_samples must count every write, and the
// read data must arrive one clock after rd_en.
module tb_trace_memory;
  import ie_pkg::*;

  localparam int unsigned DEPTH = 512;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        wr_valid = 1'b0, rd_en = 1'b0;
  probe_t      wr_data = '0, rd_data;
  logic [8:0]  rd_addr = '0;
  logic [31:0] n_samples;
  int          checks = 0, failures = 0;
  probe_t      written [$];

  always #5 clk = ~clk;

  trace_memory dut (
    .clk(clk), .rst_n(rst_n), .wr_valid(wr_valid), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data), .n_samples(n_samples)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all(input int n_written);
    for (int a = 0; a < DEPTH && a < n_written; a++) begin
      int last;
      @(negedge clk);
      rd_en = 1'b1; rd_addr = 9'(a);
      @(negedge clk);
      rd_en = 1'b0;
      // last sample number that landed at address a
      last = a + ((n_written - 1 - a) / DEPTH) * DEPTH;
      checks++;
      if (rd_data != written[last]) begin
        failures++; $display("addr %0d: %h expected sample %0d = %h", a, rd_data, last, written[last]);
      end
      // rd_data holds while rd_en is low
      @(negedge clk);
      checks++;
      if (rd_data != written[last]) begin failures++; $display("addr %0d: read data not held", a); end
    end
  endtask

  task automatic write_n(input int n);
    int done = 0;
    while (done < n) begin
      @(negedge clk);
      wr_valid = ($urandom % 4) != 0;
      wr_data  = {$urandom, $urandom};
      if (wr_valid) begin written.push_back(wr_data); done++; end
    end
    @(negedge clk);
    wr_valid = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    write_n(100);
    checks++;
    if (n_samples != 100) begin failures++; $display("count %0d after 100", n_samples); end
    read_all(100);
    write_n(DEPTH + 77 - 100);    // wraps
    checks++;
    if (n_samples != DEPTH + 77) begin failures++; $display("count %0d after wrap", n_samples); end
    read_all(DEPTH + 77);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
