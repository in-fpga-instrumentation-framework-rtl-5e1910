// instrument_engine: one embedded instrument, the hardware behind a call of
// instrument(sel, index, var) inside an OpenCL kernel.
//
// Datapath: the upstream interface accepts the call and registers the
// arguments with a stamp from the engine's own monitor timer; the probe
// multiplexer turns the registered sample into a 64-bit monitor, untimed or
// timed probe word according to the selector; the trace buffer holds the
// words until the downstream side takes them.
//
//   kernel --ivalid/oready--> upstream_if --> probe_mux --> trace_buffer
//          --ovalid/iready--> downstream (trace memory / global memory)
//
// Timing: with the downstream side ready, a call accepted in cycle k appears
// on probe with ovalid in cycle k+1 (latency 1, the engine's declared
// latency), and one call can be accepted every cycle.  The time stamp is the
// timer value of cycle k.  If the downstream side stalls, up to TB_DEPTH
// words plus one registered sample are absorbed before oready falls.
// The structure follows the engine's published block diagram; TB_DEPTH is
// this design's choice.
module instrument_engine
  import ie_pkg::*;
#(
  parameter int unsigned TB_DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  // upstream (kernel calls the instrument)
  input  logic   ivalid,
  output logic   oready,
  input  sel_t   sel,
  input  idx_t   index,
  input  var_t   value,
  // downstream (probe words out)
  output logic   ovalid,
  input  logic   iready,
  output probe_t probe
);

  ts_t     now;
  logic    smp_valid, smp_ready;
  sample_t smp;
  probe_t  word;

  ie_monitor u_monitor (
    .clk    (clk),
    .rst_n  (rst_n),
    .time_o (now)
  );

  ie_upstream_if u_up (
    .clk         (clk),
    .rst_n       (rst_n),
    .ivalid      (ivalid),
    .oready      (oready),
    .sel_i       (sel),
    .index_i     (index),
    .value_i     (value),
    .time_i      (now),
    .smp_valid_o (smp_valid),
    .smp_o       (smp),
    .smp_ready_i (smp_ready)
  );

  ie_probe_mux u_mux (
    .smp_i   (smp),
    .probe_o (word)
  );

  ie_trace_buffer #(.DEPTH(TB_DEPTH)) u_tb (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (smp_valid),
    .in_ready (smp_ready),
    .in_data  (word),
    .ovalid   (ovalid),
    .iready   (iready),
    .probe    (probe)
  );

endmodule
