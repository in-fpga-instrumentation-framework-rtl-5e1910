// tb_instr_system: end-to-end run of the whole FPGA design at its default
// sizes, on the evaluated workload of 50,000 work-items (200 KB of 32-bit
// inputs) for each use case.
//
// Single kernel: the input stream carries eight gaps of 94 to 286 cycles,
// 1258 stall cycles in all, the stall profile of the reference run.  The
// timed probes of I4 must show exactly these eight stalls (II = gap + 1,
// II = 1 everywhere else), the kernel time must satisfy
//   Tsk = L + II * (N - 1) + Tstalls   with L = 4, II = 1, Tstalls = 1258
// with Tsk measured from the first I1 stamp to the last I4 stamp, so
// Tsk = 51261 cycles, and the I3->I4 latency must be 3 cycles.  After the
// run the selector is switched to the monitor and then to the untimed probe
// for a few more work-items, whose probe words must have those layouts.
// Multikernel: bursts of z back-pressure fill Mul_OUT and the Load pipes,
// input bubbles empty them, and a stretch of trace back-pressure stalls the
// instruments; every stamp, index, value and z is checked, and the II
// difference matrix must show stalls.
// Finally the host port reads every trace memory, which has wrapped, and
// each entry and sample count is compared with the probe words seen.
// Each mechanism (input gap, pipe full, pipe empty, z stall, trace stall,
// three probe modes, trace-memory wrap) is counted and must occur.
module tb_instr_system;
  import ie_pkg::*;

  localparam int N = 50000, NM = 20, TD = 512;
  localparam int GAPS = 8;
  localparam int GAP_LEN [GAPS] = '{94, 286, 150, 180, 120, 200, 128, 100};
  localparam int SK_TOTAL = N + 2 * NM;

  logic clk = 1'b0, rst_n = 1'b0;
  ts_t  cyc;
  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cyc <= '0; else cyc <= cyc + 1'b1;

  // DUT ports
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

  int checks = 0, failures = 0;
  // mechanism counters
  int n_gap = 0, n_pipe_full = 0, n_pipe_empty = 0, n_zstall = 0, n_trstall = 0;
  int n_mode [3] = '{0, 0, 0};

  data_t  skx [SK_TOTAL], sky [SK_TOTAL], mkx [N], mky [N];
  sel_t   sk_item_sel [SK_TOTAL];
  longint sk_tload [SK_TOTAL], mk_tload [N], mk_tstore [N];
  probe_t sk_w [4][SK_TOTAL];
  probe_t mk_w [6][N];
  int sk_in = 0, sk_out = 0, mk_in = 0, mk_out = 0;
  int sk_ntr [4] = '{0, 0, 0, 0};
  int mk_ntr [6] = '{0, 0, 0, 0, 0, 0};

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic probe_t fmt(sel_t s, longint t, int i, data_t v);
    if (s == 0)      return {16'h0, 32'(t), 16'(i)};
    else if (s == 1) return {32'h0, 16'(v), 16'(i)};
    else             return {32'(t), 16'(i), 16'(v)};
  endfunction

  task automatic collect();
    for (int n = 0; n < 4; n++)
      if (sk_tr_valid[n] && sk_tr_ready[n]) begin sk_w[n][sk_ntr[n]] = sk_tr_probe[n]; sk_ntr[n]++; end
    for (int n = 0; n < 6; n++)
      if (mk_tr_valid[n] && mk_tr_ready[n]) begin mk_w[n][mk_ntr[n]] = mk_tr_probe[n]; mk_ntr[n]++; end
  endtask

  int gap_left = 0, gap_idx = 0;

  initial begin
    for (int i = 0; i < SK_TOTAL; i++) begin
      skx[i] = $urandom; sky[i] = $urandom;
      sk_item_sel[i] = (i < N) ? SEL_TIMED : (i < N + NM) ? SEL_MONITOR : SEL_UNTIMED;
    end
    for (int i = 0; i < N; i++) begin mkx[i] = $urandom; mky[i] = $urandom; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int k = 0; sk_out < SK_TOTAL || mk_out < N; k++) begin
      @(negedge clk);
      // ---- single kernel stimulus: gaps at items 5000, 10000, ...
      if (gap_left == 0 && gap_idx < GAPS && sk_in == (gap_idx + 1) * 5000) begin
        gap_left = GAP_LEN[gap_idx];
        gap_idx++;
      end
      // the selector is one value for the whole kernel: a mode switch waits
      // until the work-items of the previous mode have left the pipeline
      if (sk_in < SK_TOTAL && gap_left == 0 && !(sk_in == N && sk_out < N) &&
          !(sk_in == N + NM && sk_out < N + NM)) begin
        sk_in_valid = 1'b1;
        sk_x   = skx[sk_in];
        sk_y   = sky[sk_in];
        sk_sel = sk_item_sel[sk_in];
      end else begin
        sk_in_valid = 1'b0;
        if (gap_left > 0) begin gap_left--; n_gap++; end
      end
      // ---- multikernel stimulus
      if (mk_in < N) begin
        mk_in_valid = ((k % 700) > 600) ? 1'b0 : (($urandom % 10) != 0);
        mk_x = mkx[mk_in];
        mk_y = mky[mk_in];
      end else mk_in_valid = 1'b0;
      mk_z_ready  = (k % 1000) < 900;
      mk_tr_ready = (mk_in > 20000 && mk_in < 20500) ? 6'($urandom) : '1;
      #1;
      // ---- handshakes at the coming edge
      if (sk_in_valid && sk_in_ready) begin sk_tload[sk_in] = longint'(cyc); sk_in++; end
      if (sk_z_valid && sk_z_ready) begin
        checks++;
        if (sk_z != (skx[sk_out] + sky[sk_out]) * skx[sk_out]) begin failures++; $display("sk item %0d: z %h", sk_out, sk_z); end
        sk_out++;
      end
      if (mk_in_valid && !mk_in_ready && mk_tr_ready == '1) n_pipe_full++;
      if (mk_tr_ready != '1 && mk_in_valid && !mk_in_ready) n_trstall++;
      if (!dut.u_mk.la_valid && mk_in > 0 && mk_in < N) n_pipe_empty++;
      if (mk_z_valid && !mk_z_ready) n_zstall++;
      if (mk_in_valid && mk_in_ready) begin mk_tload[mk_in] = longint'(cyc); mk_in++; end
      if (mk_z_valid && mk_z_ready) begin
        checks++;
        if (mk_z != mky[mk_out] * (mkx[mk_out] + mky[mk_out])) begin failures++; $display("mk item %0d: z %h", mk_out, mk_z); end
        mk_tstore[mk_out] = longint'(cyc);
        mk_out++;
      end
      collect();
    end
    repeat (10) begin
      @(negedge clk);
      mk_tr_ready = '1;
      #1;
      collect();
    end

    // ---------------------------------------------------- single kernel
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (sk_ntr[n] != SK_TOTAL) begin failures++; $display("sk I%0d: %0d words", n + 1, sk_ntr[n]); end
    end
    begin
      int stalls, stall_sum, bad;
      longint t_first, t_last, tsk, t4_prev;
      stalls = 0; stall_sum = 0; bad = 0;
      for (int i = 0; i < SK_TOTAL; i++) begin
        data_t a, b;
        a = skx[i]; b = sky[i];
        for (int n = 0; n < 4; n++) begin
          data_t v;
          longint t;
          v = (n == 0) ? a : (n == 1) ? b : (n == 2) ? a + b : (a + b) * a;
          t = (n < 2) ? sk_tload[i] : (n == 2) ? sk_tload[i] + 1 : sk_tload[i] + 4;
          checks++;
          if (sk_w[n][i] != fmt(sk_item_sel[i], t, i, v)) begin
            bad++;
            if (bad < 10) $display("sk I%0d item %0d: %h expected %h", n + 1, i, sk_w[n][i], fmt(sk_item_sel[i], t, i, v));
          end
        end
        if (sk_item_sel[i] == SEL_MONITOR) n_mode[0]++;
        if (sk_item_sel[i] == SEL_UNTIMED) n_mode[1]++;
        if (sk_item_sel[i] == SEL_TIMED)   n_mode[2]++;
        // II seen by I4 over the timed run
        if (i > 0 && i < N) begin
          longint ii;
          ii = longint'(sk_w[3][i][63:32]) - t4_prev;
          if (ii != 1) begin
            stalls++; stall_sum += int'(ii - 1);
            checks++;
            if (ii - 1 != longint'(GAP_LEN[stalls - 1])) begin failures++; $display("stall %0d: %0d cycles", stalls, ii - 1); end
          end
        end
        if (i < N) t4_prev = longint'(sk_w[3][i][63:32]);
      end
      failures += bad;
      t_first = longint'(sk_w[0][0][63:32]);
      t_last  = longint'(sk_w[3][N-1][63:32]);
      tsk     = t_last - t_first;
      checks++;
      if (stalls != GAPS || stall_sum != 1258) begin failures++; $display("I4 saw %0d stalls, %0d cycles", stalls, stall_sum); end
      checks++;
      if (tsk != longint'(N) + 3 + 1258) begin failures++; $display("Tsk %0d", tsk); end
      checks++;
      if (longint'(sk_w[3][0][63:32]) - longint'(sk_w[2][0][63:32]) != 3) begin failures++; $display("multiplication latency wrong"); end
      $display("single kernel: N=%0d Tsk=%0d cycles, %0d stalls of %0d cycles (%0.1f%%)",
               N, tsk, stalls, stall_sum, 100.0 * stall_sum / N);
    end

    // ------------------------------------------------------- multikernel
    for (int n = 0; n < 6; n++) begin
      checks++;
      if (mk_ntr[n] != N) begin failures++; $display("mk I%0d: %0d words", n + 1, mk_ntr[n]); end
    end
    begin
      int bad, n_delta;
      bad = 0; n_delta = 0;
      for (int i = 0; i < N; i++) begin
        data_t a, b;
        a = mkx[i]; b = mky[i];
        for (int n = 0; n < 6; n++) begin
          data_t v;
          v = (n == 0 || n == 2) ? a : (n == 1 || n == 3) ? b : b * (a + b);
          checks++;
          if (mk_w[n][i][31:0] != {16'(i), 16'(v)}) bad++;
        end
        checks++;
        if (longint'(mk_w[0][i][63:32]) != mk_tload[i] || longint'(mk_w[5][i][63:32]) != mk_tstore[i] ||
            mk_w[2][i][63:32] <= mk_w[0][i][63:32] || mk_w[4][i][63:32] <= mk_w[2][i][63:32] ||
            mk_w[5][i][63:32] <= mk_w[4][i][63:32]) bad++;
        if (i > 1) for (int n = 0; n < 6; n++) begin
          longint d;
          d = (longint'(mk_w[n][i][63:32]) - longint'(mk_w[n][i-1][63:32])) -
              (longint'(mk_w[n][i-1][63:32]) - longint'(mk_w[n][i-2][63:32]));
          if (d != 0) n_delta++;
        end
      end
      failures += bad;
      if (bad != 0) $display("multikernel: %0d bad probe words or stamps", bad);
      checks++;
      if (n_delta == 0) begin failures++; $display("no stall in the II difference matrix"); end
      $display("multikernel: N=%0d, %0d non-zero II differences, Tsk=%0d cycles", N, n_delta,
               longint'(mk_w[5][N-1][63:32]) - longint'(mk_w[0][0][63:32]));
    end

    // -------------------------------------------------- host read-back
    for (int kern = 0; kern < 2; kern++) begin
      for (int n = 0; n < ((kern == 0) ? 4 : 6); n++) begin
        int total;
        total = (kern == 0) ? SK_TOTAL : N;
        for (int a = 0; a < TD; a++) begin
          int last;
          probe_t e;
          @(negedge clk);
          hr_en = 1'b1; hr_kernel = kern[0]; hr_inst = 3'(n); hr_addr = 9'(a);
          @(negedge clk);
          hr_en = 1'b0;
          last = a + ((total - 1 - a) / TD) * TD;
          e = (kern == 0) ? sk_w[n][last] : mk_w[n][last];
          checks++;
          if (hr_data != e || hr_count != 32'(total)) begin
            failures++;
            if (failures < 20) $display("trace memory %0d/%0d entry %0d: %h (count %0d)", kern, n, a, hr_data, hr_count);
          end
        end
      end
    end

    // ------------------------------------------------- mechanisms seen
    $display("input gaps %0d, pipe full %0d, pipe empty %0d, z stalls %0d, trace stalls %0d, modes %0d/%0d/%0d",
             n_gap, n_pipe_full, n_pipe_empty, n_zstall, n_trstall, n_mode[0], n_mode[1], n_mode[2]);
    checks++;
    if (n_gap == 0 || n_pipe_full == 0 || n_pipe_empty == 0 || n_zstall == 0 || n_trstall == 0 ||
        n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || SK_TOTAL <= TD) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
