// tb_instrument_engine: calls the instrument with random selectors and
// arguments while the downstream side is randomly ready.  Every probe word
// is compared with the word built from the call and from the testbench's
// own cycle count at acceptance; an unstalled call must come out one cycle
// after it was accepted, and a back-to-back run must be accepted every cycle.
module tb_instrument_engine;
  import ie_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   ivalid = 1'b0, oready, ovalid, iready = 1'b1;
  sel_t   sel = '0;
  idx_t   index = '0;
  var_t   value = '0;
  probe_t probe;
  ts_t    cyc;
  int     checks = 0, failures = 0, n_lat1 = 0, n_block = 0;
  probe_t q[$];
  int     qt[$];

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cyc <= '0; else cyc <= cyc + 1'b1;

  instrument_engine dut (
    .clk(clk), .rst_n(rst_n), .ivalid(ivalid), .oready(oready), .sel(sel),
    .index(index), .value(value), .ovalid(ovalid), .iready(iready), .probe(probe)
  );

  function automatic probe_t expect_word(sel_t s, idx_t i, var_t v, ts_t t);
    if (s == 0)      return {16'h0, t, i};
    else if (s == 1) return {32'h0, v, i};
    else             return {t, i, v};
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic taken = 1'b1;  // last call was accepted, so new arguments may be driven

  task automatic step(input bit rnd_valid, input bit rnd_ready, input int k);
    @(negedge clk);
    // new stimulus; a call not accepted is held unchanged
    if (taken) begin
      ivalid = rnd_valid ? (($urandom % 3) != 0) : 1'b1;
      sel    = $urandom % 4;
      index  = 16'($urandom);
      value  = 16'($urandom);
    end
    iready = rnd_ready ? (($urandom % 3) == 0) : 1'b1;
    #1;
    // handshakes that happen at the coming clock edge
    taken = !ivalid || oready;
    if (ivalid && oready)
      begin q.push_back(expect_word(sel, index, value, cyc)); qt.push_back(int'(cyc)); end
    if (ivalid && !oready) n_block++;
    if (ovalid && iready) begin
      checks++;
      if (q.size() == 0 || probe != q[0]) begin
        failures++; $display("cycle %0d: probe %h expected %h", k, probe, (q.size() > 0) ? q[0] : '0);
      end else begin
        if (int'(cyc) - qt[0] == 1) n_lat1++;
        void'(q.pop_front()); void'(qt.pop_front());
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // back-to-back calls, downstream always ready: latency 1, one per cycle
    for (int k = 0; k < 200; k++) begin
      step(1'b0, 1'b0, k);
      if (k > 0) begin
        checks++;
        if (!oready) begin failures++; $display("cycle %0d: stall without back-pressure", k); end
      end
    end
    checks++;
    if (n_lat1 < 195) begin failures++; $display("only %0d words had latency 1", n_lat1); end
    // random calls against a slow downstream side
    for (int k = 200; k < 8000; k++) step(1'b1, 1'b1, k);
    // drain
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      ivalid = 1'b0;
      iready = 1'b1;
      #1;
      if (ovalid && iready) begin
        checks++;
        if (probe != q[0]) begin failures++; $display("drain: probe %h expected %h", probe, q[0]); end
        void'(q.pop_front()); void'(qt.pop_front());
      end
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d words lost", q.size()); end
    checks++;
    if (n_block == 0) begin failures++; $display("back-pressure never reached the kernel side"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
