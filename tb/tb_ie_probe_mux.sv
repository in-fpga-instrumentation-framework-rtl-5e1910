// tb_ie_probe_mux: drives random samples and selectors into the probe
// multiplexer and compares the result with probe words built bit by bit
// from the published layouts.
module tb_ie_probe_mux;
  import ie_pkg::*;

  sample_t smp;
  probe_t  probe, exp_w;
  int      checks = 0, failures = 0;
  int      n_sel [3] = '{0, 0, 0};

  ie_probe_mux dut (.smp_i(smp), .probe_o(probe));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int unsigned r;
      r = $urandom % 4;
      smp.sel   = (r == 0) ? 32'd0 : (r == 1) ? 32'd1 : (r == 2) ? 32'd2 : $urandom;
      if (r == 3 && smp.sel < 2) smp.sel = 32'd7;
      smp.index = 16'($urandom);
      smp.value = 16'($urandom);
      smp.stamp = $urandom;
      #1;
      exp_w = '0;
      if (smp.sel == 0) begin
        for (int b = 0; b < 16; b++) exp_w[b]      = smp.index[b];
        for (int b = 0; b < 32; b++) exp_w[16 + b] = smp.stamp[b];
        n_sel[0]++;
      end else if (smp.sel == 1) begin
        for (int b = 0; b < 16; b++) exp_w[b]      = smp.index[b];
        for (int b = 0; b < 16; b++) exp_w[16 + b] = smp.value[b];
        n_sel[1]++;
      end else begin
        for (int b = 0; b < 16; b++) exp_w[b]      = smp.value[b];
        for (int b = 0; b < 16; b++) exp_w[16 + b] = smp.index[b];
        for (int b = 0; b < 32; b++) exp_w[32 + b] = smp.stamp[b];
        n_sel[2]++;
      end
      checks++;
      if (probe !== exp_w) begin
        failures++;
        $display("sel=%0d index=%h value=%h stamp=%h: got %h expected %h",
                 smp.sel, smp.index, smp.value, smp.stamp, probe, exp_w);
      end
    end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (n_sel[m] == 0) begin failures++; $display("mode %0d never exercised", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
