// tb_mk_system: runs the instrumented multikernel design (load, compute and
// store kernels joined by pipes) over N work-items.
// Phase 1 (the first N1 items) has no bubbles and no back-pressure: the
// initiation-interval matrix of all six instruments must be all ones (its
// difference matrix all zeros) and the latencies I1->I3, I3->I5 and I5->I6
// one cycle each.  Phase 2 stalls the z output in long bursts, so that the
// Mul_OUT pipe and then the Load pipes fill and the load kernel stalls, adds
// input bubbles, so that the compute kernel finds its pipes empty, and
// stalls the trace outputs.  Throughout, z must equal y * (x + y), every
// timed probe must carry the right index and variable, and the stamps of
// I1/I2 and I6 must equal the load and store handshake cycles.
module tb_mk_system;
  import ie_pkg::*;

  localparam int N = 500, N1 = 64, PIPE_DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, z_valid, z_ready = 1'b0;
  data_t x = '0, y = '0, z;
  logic [5:0] tr_valid, tr_ready = '1;
  probe_t [5:0] tr_probe;
  ts_t cyc;

  int checks = 0, failures = 0;
  data_t xs [N], ys [N];
  longint t_load [N], t_store [N];
  longint t_ie [6][N];
  int n_in = 0, n_out = 0;
  int n_tr [6] = '{0, 0, 0, 0, 0, 0};
  int n_bubble = 0, n_pipe_full = 0, n_zstall = 0, n_trstall = 0, n_delta = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cyc <= '0; else cyc <= cyc + 1'b1;

  mk_system dut (
    .clk(clk), .rst_n(rst_n), .sel(SEL_TIMED),
    .in_valid(in_valid), .in_ready(in_ready), .x(x), .y(y),
    .z_valid(z_valid), .z_ready(z_ready), .z(z),
    .tr_valid(tr_valid), .tr_ready(tr_ready), .tr_probe(tr_probe)
  );

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic var_t expected_var(int n, int i);
    data_t a = xs[i], b = ys[i];
    case (n)
      0, 2: return var_t'(a);
      1, 3: return var_t'(b);
      default: return var_t'(b * (a + b));
    endcase
  endfunction

  task automatic take_traces();
    for (int n = 0; n < 6; n++) begin
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
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin xs[i] = $urandom; ys[i] = $urandom; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; n_out < N; k++) begin
      bit ph2;
      @(negedge clk);
      ph2 = (n_in >= N1);
      if (n_in < N) begin
        in_valid = ph2 ? ((k % 97) > 60 || ($urandom % 3) != 0) : 1'b1;
        x = xs[n_in];
        y = ys[n_in];
      end else in_valid = 1'b0;
      z_ready  = ph2 ? ((k % 53) > 30) : 1'b1;
      tr_ready = (ph2 && n_in > 300 && n_in < 360) ? 6'($urandom) : '1;
      #1;
      if (n_in < N && !in_valid) n_bubble++;
      if (in_valid && !in_ready && tr_ready == '1) n_pipe_full++;
      if (z_valid && !z_ready) n_zstall++;
      if (tr_ready != '1 && in_valid && !in_ready) n_trstall++;
      if (in_valid && in_ready) begin t_load[n_in] = longint'(cyc); n_in++; end
      if (z_valid && z_ready) begin
        checks++;
        if (z != ys[n_out] * (xs[n_out] + ys[n_out])) begin failures++; $display("item %0d: z %h", n_out, z); end
        t_store[n_out] = longint'(cyc);
        n_out++;
      end
      take_traces();
    end
    repeat (10) begin
      @(negedge clk);
      tr_ready = '1;
      #1;
      take_traces();
    end
    for (int n = 0; n < 6; n++) begin
      checks++;
      if (n_tr[n] != N) begin failures++; $display("I%0d delivered %0d words", n + 1, n_tr[n]); end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (t_ie[0][i] != t_load[i] || t_ie[1][i] != t_load[i] || t_ie[5][i] != t_store[i]) begin
        failures++; $display("item %0d: stamps do not match the handshakes", i);
      end
      checks++;
      if (!(t_ie[2][i] > t_ie[0][i] && t_ie[3][i] == t_ie[2][i] &&
            t_ie[4][i] > t_ie[2][i] && t_ie[5][i] > t_ie[4][i])) begin
        failures++; $display("item %0d: stamps out of order", i);
      end
      if (i < N1 - 2 * PIPE_DEPTH) begin
        checks++;
        if (t_ie[2][i] - t_ie[0][i] != 1 || t_ie[4][i] - t_ie[2][i] != 1 || t_ie[5][i] - t_ie[4][i] != 1) begin
          failures++; $display("item %0d: latencies not 1", i);
        end
        // initiation-interval matrix of ones, difference matrix of zeros
        if (i > 0) for (int n = 0; n < 6; n++) begin
          checks++;
          if (t_ie[n][i] - t_ie[n][i-1] != 1) begin
            failures++; $display("I%0d item %0d: II %0d", n + 1, i, t_ie[n][i] - t_ie[n][i-1]);
          end
        end
      end
      // a non-zero element of the difference matrix marks a stall
      if (i > 1) for (int n = 2; n < 6; n++)
        if ((t_ie[n][i] - t_ie[n][i-1]) != (t_ie[n][i-1] - t_ie[n][i-2])) n_delta++;
    end
    checks++;
    if (n_bubble == 0 || n_pipe_full == 0 || n_zstall == 0 || n_trstall == 0 || n_delta == 0) begin
      failures++;
      $display("bubbles %0d pipe-full stalls %0d z stalls %0d trace stalls %0d deltas %0d",
               n_bubble, n_pipe_full, n_zstall, n_trstall, n_delta);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
