// trace_memory: on-chip trace memory of one instrument, read by the host.
//
// Each probe word the instrument delivers (wr_valid) is written at the next
// address of a DEPTH x 64-bit memory, so that entry i holds the i-th sample,
// like the TB[i] array an instrumented kernel declares.  After DEPTH samples
// the address wraps and the oldest entries are overwritten; n_samples counts
// every sample written (it does not wrap before 2^32).  The host side reads
// one entry per cycle: rd_data returns the word at rd_addr one clock after
// rd_en, as a block RAM does.
//
// The memory itself, its 64-bit width and its use for host read-back follow
// the framework's description; the sequential addressing, the wrap and the
// default DEPTH of 512 (one 64-bit column of two 512-deep block RAMs) are
// this design's choices.
module trace_memory
  import ie_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write side (from the instrument's downstream interface)
  input  logic                     wr_valid,
  input  probe_t                   wr_data,
  // host read side
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output probe_t                   rd_data,
  output logic [31:0]              n_samples
);

  localparam int unsigned AW = $clog2(DEPTH);

  probe_t        mem [DEPTH];
  logic [AW-1:0] wptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      n_samples <= '0;
    end else if (wr_valid) begin
      wptr      <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      n_samples <= n_samples + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid) mem[wptr] <= wr_data;
    if (rd_en)    rd_data   <= mem[rd_addr];
  end

endmodule
