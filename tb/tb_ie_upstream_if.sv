// tb_ie_upstream_if: random ivalid and trace-buffer readiness.  A reference
// model of a one-entry register checks oready, the registered arguments and
// the time stamp of the acceptance cycle, and that a waiting sample is held.
module tb_ie_upstream_if;
  import ie_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    ivalid = 1'b0, oready, smp_valid, smp_ready = 1'b0;
  sel_t    sel = '0;
  idx_t    index = '0;
  var_t    value = '0;
  ts_t     now = '0;
  sample_t smp;
  int      checks = 0, failures = 0, n_acc = 0, n_block = 0;

  // reference state
  logic    m_valid = 1'b0;
  sample_t m_smp;

  always #5 clk = ~clk;

  ie_upstream_if dut (
    .clk(clk), .rst_n(rst_n), .ivalid(ivalid), .oready(oready),
    .sel_i(sel), .index_i(index), .value_i(value), .time_i(now),
    .smp_valid_o(smp_valid), .smp_o(smp), .smp_ready_i(smp_ready)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_ready;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      // compare with the reference after the last edge
      checks++;
      if (smp_valid != m_valid || (m_valid && smp != m_smp)) begin
        failures++;
        $display("cycle %0d: valid %b/%b sample %h expected %h", k, smp_valid, m_valid, smp, m_smp);
      end
      // new stimulus
      ivalid    = ($urandom % 4) != 0;
      smp_ready = ($urandom % 3) != 0;
      sel       = $urandom % 3;
      index     = 16'($urandom);
      value     = 16'($urandom);
      now       = $urandom;
      #1;
      exp_ready = !m_valid || smp_ready;
      checks++;
      if (oready != exp_ready) begin failures++; $display("cycle %0d: oready %b", k, oready); end
      if (ivalid && !exp_ready) n_block++;
      // reference update for the coming edge
      if (ivalid && exp_ready) begin
        m_valid = 1'b1;
        m_smp   = '{sel: sel, index: index, value: value, stamp: now};
        n_acc++;
      end else if (smp_ready) begin
        m_valid = 1'b0;
      end
    end
    checks++;
    if (n_acc == 0 || n_block == 0) begin failures++; $display("acceptance or blocking never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
