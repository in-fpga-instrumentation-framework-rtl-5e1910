// ie_pkg: widths, selector codes and the sample record shared by the
// instrument engine (IE) and the instrumented kernels.
//
// An instrument receives a selector, a work-item index and a variable from
// the kernel and returns a 64-bit probe word.  The field widths follow the
// engine's published port list: a 32-bit selector, a 16-bit index, a 16-bit
// variable, a 32-bit cycle timer and a 64-bit probe.  Selector 0 chooses the
// monitor, 1 the untimed probe and any other value the timed probe.
// Kernel data words are 32 bits (OpenCL int); only their low VAR_W bits are
// sampled by an instrument, which is this design's choice.
package ie_pkg;

  localparam int unsigned TS_W    = 32;  // cycle timer
  localparam int unsigned IDX_W   = 16;  // work-item index
  localparam int unsigned VAR_W   = 16;  // sampled variable
  localparam int unsigned SEL_W   = 32;  // selector
  localparam int unsigned PROBE_W = 64;  // probe word
  localparam int unsigned DATA_W  = 32;  // kernel data (OpenCL int)

  typedef logic [TS_W-1:0]    ts_t;
  typedef logic [IDX_W-1:0]   idx_t;
  typedef logic [VAR_W-1:0]   var_t;
  typedef logic [SEL_W-1:0]   sel_t;
  typedef logic [PROBE_W-1:0] probe_t;
  typedef logic [DATA_W-1:0]  data_t;

  // Selector values
  localparam sel_t SEL_MONITOR = 32'd0;
  localparam sel_t SEL_UNTIMED = 32'd1;
  localparam sel_t SEL_TIMED   = 32'd2;  // any value above 1 selects it

  // One accepted call of instrument(sel, index, var), with the timer value
  // of the cycle in which it was accepted.
  typedef struct packed {
    sel_t sel;
    idx_t index;
    var_t value;
    ts_t  stamp;
  } sample_t;

  // Probe word layouts (most significant field first):
  //   monitor : {16'b0, stamp[31:0], index[15:0]}
  //   untimed : {32'b0, value[15:0], index[15:0]}
  //   timed   : {stamp[31:0], index[15:0], value[15:0]}
  function automatic probe_t fmt_monitor(ts_t stamp, idx_t index);
    return probe_t'({stamp, index});
  endfunction

  function automatic probe_t fmt_untimed(var_t value, idx_t index);
    return probe_t'({value, index});
  endfunction

  function automatic probe_t fmt_timed(ts_t stamp, idx_t index, var_t value);
    return {stamp, index, value};
  endfunction

endpackage
