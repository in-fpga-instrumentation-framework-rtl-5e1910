// tb_sk_kernel: runs the instrumented single kernel over N work-items.
// Phase 1 (the first N1 items) has no bubbles and no back-pressure: every
// instrument must then see an initiation interval of 1, the addition must
// take 1 cycle (I1 to I3) and the multiplication MUL_LAT cycles (I3 to I4).
// Phase 2 adds input bubbles, a stalling z output and a stalling trace
// output.  In both phases each z must equal (x + y) * x, each timed probe
// must carry the right index and variable, and the time stamps of I1/I2 and
// I4 must equal the testbench's own cycle count at the load and store
// handshakes.
module tb_sk_kernel;
  import ie_pkg::*;

  localparam int N = 400, N1 = 64, MUL_LAT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, z_valid, z_ready = 1'b0;
  data_t x = '0, y = '0, z;
  logic [3:0] tr_valid, tr_ready = 4'hF;
  probe_t [3:0] tr_probe;
  ts_t cyc;

  int checks = 0, failures = 0;
  data_t xs [N], ys [N];
  longint t_load [N], t_store [N];
  longint t_ie [4][N];
  int n_in = 0, n_out = 0;
  int n_tr [4] = '{0, 0, 0, 0};
  int n_bubble = 0, n_zstall = 0, n_trstall = 0, n_stalls_seen = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cyc <= '0; else cyc <= cyc + 1'b1;

  sk_kernel dut (
    .clk(clk), .rst_n(rst_n), .sel(SEL_TIMED),
    .in_valid(in_valid), .in_ready(in_ready), .x(x), .y(y),
    .z_valid(z_valid), .z_ready(z_ready), .z(z),
    .tr_valid(tr_valid), .tr_ready(tr_ready), .tr_probe(tr_probe)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic var_t expected_var(int n, int i);
    data_t a = xs[i], b = ys[i];
    case (n)
      0: return var_t'(a);
      1: return var_t'(b);
      2: return var_t'(a + b);
      default: return var_t'((a + b) * a);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin xs[i] = $urandom; ys[i] = $urandom; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (n_out < N) begin
      bit stalled_phase;
      @(negedge clk);
      stalled_phase = (n_in >= N1);
      // stimulus
      if (n_in < N) begin
        in_valid = stalled_phase ? (($urandom % 5) != 0) : 1'b1;
        x = xs[n_in];
        y = ys[n_in];
      end else in_valid = 1'b0;
      z_ready  = stalled_phase ? (($urandom % 6) != 0) : 1'b1;
      tr_ready = (stalled_phase && n_in > 200 && n_in < 260) ? 4'($urandom) : 4'hF;
      #1;
      if (n_in < N && !in_valid) n_bubble++;
      if (z_valid && !z_ready) n_zstall++;
      if (tr_ready != 4'hF && !in_ready) n_trstall++;
      // handshakes at the coming edge
      if (in_valid && in_ready) begin t_load[n_in] = longint'(cyc); n_in++; end
      if (z_valid && z_ready) begin
        checks++;
        if (z != (xs[n_out] + ys[n_out]) * xs[n_out]) begin
          failures++; $display("item %0d: z %h", n_out, z);
        end
        t_store[n_out] = longint'(cyc);
        n_out++;
      end
      for (int n = 0; n < 4; n++) begin
        if (tr_valid[n] && tr_ready[n]) begin
          int i;
          i = n_tr[n];
          checks++;
          if (tr_probe[n][31:16] != 16'(i) || tr_probe[n][15:0] != expected_var(n, i)) begin
            failures++; $display("I%0d word %0d: %h", n + 1, i, tr_probe[n]);
          end
          t_ie[n][i] = longint'(tr_probe[n][63:32]);
          n_tr[n]++;
        end
      end
    end
    // let the last probe words out
    repeat (10) begin
      @(negedge clk);
      tr_ready = 4'hF;
      #1;
      for (int n = 0; n < 4; n++)
        if (tr_valid[n]) begin t_ie[n][n_tr[n]] = longint'(tr_probe[n][63:32]); n_tr[n]++; end
    end
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (n_tr[n] != N) begin failures++; $display("I%0d delivered %0d words", n + 1, n_tr[n]); end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (t_ie[0][i] != t_load[i] || t_ie[1][i] != t_load[i] || t_ie[3][i] != t_store[i]) begin
        failures++;
        $display("item %0d: stamps I1 %0d I2 %0d I4 %0d, load %0d store %0d",
                 i, t_ie[0][i], t_ie[1][i], t_ie[3][i], t_load[i], t_store[i]);
      end
      checks++;
      if (!(t_ie[2][i] > t_ie[0][i] && t_ie[3][i] - t_ie[2][i] >= longint'(MUL_LAT))) begin
        failures++; $display("item %0d: I3 stamp %0d out of order", i, t_ie[2][i]);
      end
      if (i < N1 - 8) begin
        checks++;
        if (t_ie[2][i] - t_ie[0][i] != 1 || t_ie[3][i] - t_ie[2][i] != longint'(MUL_LAT)) begin
          failures++; $display("item %0d: latencies %0d, %0d", i, t_ie[2][i] - t_ie[0][i], t_ie[3][i] - t_ie[2][i]);
        end
        if (i > 0) begin
          for (int n = 0; n < 4; n++) begin
            checks++;
            if (t_ie[n][i] - t_ie[n][i-1] != 1) begin
              failures++; $display("I%0d item %0d: II %0d", n + 1, i, t_ie[n][i] - t_ie[n][i-1]);
            end
          end
        end
      end
      if (i > 0 && t_ie[3][i] - t_ie[3][i-1] > 1) n_stalls_seen++;
    end
    checks++;
    if (n_bubble == 0 || n_zstall == 0 || n_trstall == 0 || n_stalls_seen == 0) begin
      failures++;
      $display("bubbles %0d z stalls %0d trace stalls %0d stalls seen by I4 %0d",
               n_bubble, n_zstall, n_trstall, n_stalls_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
