// tb_workload_sizes: the single-kernel use case (four instruments, timed
// probes) on the five workload sizes of the execution-time study: 5 KB,
// 40 KB, 100 KB, 4 MB and 40 MB of 32-bit inputs, i.e. 1,250, 10,000,
// 25,000, 1,000,000 and 10,000,000 work-items, run one after the other on
// the full design at its default sizes with a stall-free input stream.
// For every work-item it checks z = (x + y) * x and the I1 and I4 probe
// words (index = i modulo 2^16, the stamp of the load cycle and of the load
// cycle plus 4); for every run it checks that the kernel time from the first
// I1 stamp to the last I4 stamp is L + (N - 1) with L = 4, and that the
// trace memories counted every sample.  The data are a simple hash of i so
// that nothing has to be stored.
module tb_workload_sizes;
  import ie_pkg::*;

  localparam int NRUN = 5;
  localparam int SIZES [NRUN] = '{1250, 10000, 25000, 1000000, 10000000};

  logic clk = 1'b0, rst_n = 1'b0;
  ts_t  cyc;
  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cyc <= '0; else cyc <= cyc + 1'b1;

  sel_t sk_sel = SEL_TIMED, mk_sel = SEL_TIMED;
  logic sk_in_valid = 0, sk_in_ready, sk_z_valid, sk_z_ready = 1;
  logic mk_in_valid = 0, mk_in_ready, mk_z_valid, mk_z_ready = 1;
  data_t sk_x = 0, sk_y = 0, sk_z, mk_x = 0, mk_y = 0, mk_z;
  logic [3:0] sk_tr_valid, sk_tr_ready = '1;
  logic [5:0] mk_tr_valid, mk_tr_ready = '1;
  probe_t [3:0] sk_tr_probe;
  probe_t [5:0] mk_tr_probe;
  logic hr_en = 0, hr_kernel = 0;
  logic [2:0] hr_inst = 0;
  logic [8:0] hr_addr = 0;
  probe_t hr_data;
  logic [31:0] hr_count;

  instr_system dut (.*);

  int checks = 0, failures = 0, bad = 0;

  function automatic data_t xv(int i); return data_t'(i) * 32'h9E3779B1 + 32'h1234; endfunction
  function automatic data_t yv(int i); return data_t'(i) * 32'h85EBCA77 ^ 32'h00C0FFEE; endfunction

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NRUN; r++) begin
      int n, n_in, n_out, n1, n4;
      longint t_first, t_last;
      longint tl[$];
      n = SIZES[r];
      n_in = 0; n_out = 0; n1 = 0; n4 = 0;
      t_first = 0; t_last = 0;
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      while (n4 < n) begin
        @(negedge clk);
        sk_in_valid = (n_in < n);
        sk_x = xv(n_in);
        sk_y = yv(n_in);
        #1;
        if (sk_in_valid && sk_in_ready) begin tl.push_back(longint'(cyc)); n_in++; end
        if (sk_z_valid) begin
          if (sk_z != (xv(n_out) + yv(n_out)) * xv(n_out)) bad++;
          n_out++;
        end
        if (sk_tr_valid[0]) begin
          if (sk_tr_probe[0][31:0] != {16'(n1), 16'(xv(n1))}) bad++;
          if (n1 == 0) t_first = longint'(sk_tr_probe[0][63:32]);
          n1++;
        end
        if (sk_tr_valid[3]) begin
          longint t;
          data_t m;
          m = (xv(n4) + yv(n4)) * xv(n4);
          t = tl.pop_front();
          if (sk_tr_probe[3] != {32'(t + 4), 16'(n4), 16'(m)}) bad++;
          t_last = longint'(sk_tr_probe[3][63:32]);
          n4++;
        end
      end
      checks += 3 * n;
      checks++;
      if (t_last - t_first != longint'(n) + 3) begin
        failures++; $display("N=%0d: Tsk %0d", n, t_last - t_first);
      end
      @(negedge clk);
      hr_en = 1'b1; hr_kernel = 1'b0; hr_inst = 3'd3; hr_addr = '0;
      @(negedge clk);
      hr_en = 1'b0;
      checks++;
      if (hr_count != 32'(n)) begin failures++; $display("N=%0d: trace memory counted %0d", n, hr_count); end
      $display("workload %0d bytes: N=%0d work-items, Tsk=%0d cycles", 4 * n, n, t_last - t_first);
    end
    failures += bad;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
