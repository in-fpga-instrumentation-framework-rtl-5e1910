// tb_ie_trace_buffer: random producer and consumer around the trace buffer.
// A queue model checks order and contents, that in_ready falls exactly when
// DEPTH words are stored, that a word reaches an empty, ready output in the
// cycle it arrives, and that a word not taken is held.
module tb_ie_trace_buffer;
  import ie_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   in_valid = 1'b0, in_ready, ovalid, iready = 1'b0;
  probe_t in_data = '0, probe;
  int     checks = 0, failures = 0, n_full = 0, n_bypass = 0, n_hold = 0;
  probe_t q[$];

  always #5 clk = ~clk;

  ie_trace_buffer #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .ovalid(ovalid), .iready(iready), .probe(probe)
  );

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    probe_t exp_out;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      // bursts of fast and slow consumption
      in_valid = ($urandom % 3) != 0;
      in_data  = {$urandom, $urandom};
      iready   = ((k / 200) % 2 == 0) ? (($urandom % 4) != 0) : (($urandom % 4) == 0);
      #1;
      checks++;
      if (in_ready != (q.size() < DEPTH)) begin
        failures++; $display("cycle %0d: in_ready %b with %0d stored", k, in_ready, q.size());
      end
      if (!in_ready) n_full++;
      checks++;
      if (ovalid != (q.size() > 0 || in_valid)) begin
        failures++; $display("cycle %0d: ovalid %b", k, ovalid);
      end
      exp_out = (q.size() > 0) ? q[0] : in_data;
      if (ovalid) begin
        checks++;
        if (probe != exp_out) begin
          failures++; $display("cycle %0d: probe %h expected %h", k, probe, exp_out);
        end
        if (q.size() == 0 && iready) n_bypass++;
        if (!iready) n_hold++;
      end
      // model update for the coming edge
      if (in_valid && in_ready) q.push_back(in_data);
      if (ovalid && iready) void'(q.pop_front());
    end
    checks++;
    if (n_full == 0 || n_bypass == 0 || n_hold == 0) begin
      failures++; $display("full %0d bypass %0d hold %0d: a case was never seen", n_full, n_bypass, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
