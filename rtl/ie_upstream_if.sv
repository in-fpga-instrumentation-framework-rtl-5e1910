// ie_upstream_if: upstream (kernel-side) interface of an instrument engine.
//
// The kernel calls instrument(sel, index, var) by presenting the three
// arguments with ivalid.  The call is accepted in a cycle where ivalid and
// oready are both high; the arguments are then registered together with the
// monitor's timer value of that cycle, and the registered sample is offered
// to the trace buffer with smp_valid_o/smp_ready_i.  oready is low only while
// a sample is held and the trace buffer cannot take it; the kernel then keeps
// its arguments for the next cycle, as on an Avalon streaming sink.
//
// Registering the arguments on acceptance follows the engine's published
// input synchronisation.  Taking the time stamp in the acceptance cycle (not
// when the sample leaves the register) is this design's choice: it keeps the
// stamp exact when the sample waits behind downstream back-pressure.
//
// Timing: a call accepted in cycle k is on smp_o in cycle k+1.  oready does
// not depend on ivalid, so a kernel may gate its ivalid with oready.
module ie_upstream_if
  import ie_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // kernel side
  input  logic    ivalid,
  output logic    oready,
  input  sel_t    sel_i,
  input  idx_t    index_i,
  input  var_t    value_i,
  // monitor
  input  ts_t     time_i,
  // trace buffer side
  output logic    smp_valid_o,
  output sample_t smp_o,
  input  logic    smp_ready_i
);

  logic accept;

  assign oready = !smp_valid_o || smp_ready_i;
  assign accept = ivalid && oready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_valid_o <= 1'b0;
      smp_o       <= '0;
    end else if (accept) begin
      smp_valid_o <= 1'b1;
      smp_o       <= '{sel: sel_i, index: index_i, value: value_i, stamp: time_i};
    end else if (smp_ready_i) begin
      smp_valid_o <= 1'b0;
    end
  end

endmodule
