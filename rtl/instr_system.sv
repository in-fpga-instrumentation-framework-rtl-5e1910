// instr_system: an FPGA carrying instrumented OpenCL kernels.
//
// Two user circuits stand side by side, each with its embedded instruments:
//   sk_*  the single-kernel use case (sk_kernel, instruments I1..I4)
//   mk_*  the multikernel use case (mk_system, instruments I1..I6)
// Every instrument's probe stream is written into an on-chip trace memory
// of its own (TRACE_DEPTH x 64 bits) and is also brought out of the top
// (sk_tr_* / mk_tr_*) as the write channel towards global memory, whose
// ready inputs model a congested global memory: a probe word is delivered,
// and stored in the trace memory, in a cycle where its valid and ready are
// both high.  Back-pressure there fills the instrument's trace buffer and
// finally stalls the kernel.
//
// Host read port: with hr_en high, hr_kernel (0 single, 1 multi), hr_inst
// (instrument number minus one) and hr_addr select one trace-memory entry;
// one clock later hr_data holds that entry and hr_count the number of
// samples that instrument has written since reset.
//
// The arrangement of user circuit, instruments and trace memories follows
// the framework's system architecture; the global-memory ports, the host
// read port and the default sizes are this design's choices.
module instr_system
  import ie_pkg::*;
#(
  parameter int unsigned TRACE_DEPTH = 512,
  parameter int unsigned TB_DEPTH    = 4,
  parameter int unsigned MUL_LAT     = 3,
  parameter int unsigned PIPE_DEPTH  = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // single-kernel use case
  input  sel_t         sk_sel,
  input  logic         sk_in_valid,
  output logic         sk_in_ready,
  input  data_t        sk_x,
  input  data_t        sk_y,
  output logic         sk_z_valid,
  input  logic         sk_z_ready,
  output data_t        sk_z,
  output logic [3:0]   sk_tr_valid,
  input  logic [3:0]   sk_tr_ready,
  output probe_t [3:0] sk_tr_probe,
  // multikernel use case
  input  sel_t         mk_sel,
  input  logic         mk_in_valid,
  output logic         mk_in_ready,
  input  data_t        mk_x,
  input  data_t        mk_y,
  output logic         mk_z_valid,
  input  logic         mk_z_ready,
  output data_t        mk_z,
  output logic [5:0]   mk_tr_valid,
  input  logic [5:0]   mk_tr_ready,
  output probe_t [5:0] mk_tr_probe,
  // host read port
  input  logic                           hr_en,
  input  logic                           hr_kernel,
  input  logic [2:0]                     hr_inst,
  input  logic [$clog2(TRACE_DEPTH)-1:0] hr_addr,
  output probe_t                         hr_data,
  output logic [31:0]                    hr_count
);

  localparam int unsigned NT = 10;  // 4 single-kernel + 6 multikernel

  sk_kernel #(.MUL_LAT(MUL_LAT), .TB_DEPTH(TB_DEPTH)) u_sk (
    .clk (clk), .rst_n (rst_n), .sel (sk_sel),
    .in_valid (sk_in_valid), .in_ready (sk_in_ready), .x (sk_x), .y (sk_y),
    .z_valid (sk_z_valid), .z_ready (sk_z_ready), .z (sk_z),
    .tr_valid (sk_tr_valid), .tr_ready (sk_tr_ready), .tr_probe (sk_tr_probe)
  );

  mk_system #(.PIPE_DEPTH(PIPE_DEPTH), .TB_DEPTH(TB_DEPTH)) u_mk (
    .clk (clk), .rst_n (rst_n), .sel (mk_sel),
    .in_valid (mk_in_valid), .in_ready (mk_in_ready), .x (mk_x), .y (mk_y),
    .z_valid (mk_z_valid), .z_ready (mk_z_ready), .z (mk_z),
    .tr_valid (mk_tr_valid), .tr_ready (mk_tr_ready), .tr_probe (mk_tr_probe)
  );

  // trace memories: 0..3 single-kernel I1..I4, 4..9 multikernel I1..I6
  logic   [NT-1:0] wr, rd;
  probe_t [NT-1:0] wdata, rdata;
  logic   [NT-1:0][31:0] cnt;
  logic   [3:0]    slot, slot_q;

  assign wr    = {mk_tr_valid & mk_tr_ready, sk_tr_valid & sk_tr_ready};
  assign wdata = {mk_tr_probe, sk_tr_probe};
  assign slot  = hr_kernel ? 4'd4 + 4'(hr_inst) : 4'(hr_inst);

  always_comb begin
    for (int t = 0; t < NT; t++) rd[t] = hr_en && (slot == 4'(t));
  end

  for (genvar t = 0; t < NT; t++) begin : g_tm
    trace_memory #(.DEPTH(TRACE_DEPTH)) u_tm (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_valid  (wr[t]),
      .wr_data   (wdata[t]),
      .rd_en     (rd[t]),
      .rd_addr   (hr_addr),
      .rd_data   (rdata[t]),
      .n_samples (cnt[t])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q   <= '0;
      hr_count <= '0;
    end else if (hr_en) begin
      slot_q   <= slot;
      hr_count <= (slot < 4'(NT)) ? cnt[slot] : '0;
    end
  end

  assign hr_data = (slot_q < 4'(NT)) ? rdata[slot_q] : '0;

endmodule
