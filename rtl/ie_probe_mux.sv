// ie_probe_mux: the three probe formats of an instrument engine and the
// selector multiplexer between them.
//
// From one accepted sample it forms
//   monitor       {16'b0, stamp, index}   timer value with the work-item index
//   untimed probe {32'b0, value, index}   variable value without timing
//   timed probe   {stamp, index, value}   variable value with its run time
// and returns the one chosen by the sample's selector: 0 gives the monitor,
// 1 the untimed probe and every other value the timed probe.  The formats,
// the selector codes and the 64-bit result follow the engine's published
// description; zero-filling the unused high bits is this design's choice.
//
// Purely combinational.
module ie_probe_mux
  import ie_pkg::*;
(
  input  sample_t smp_i,
  output probe_t  probe_o
);

  probe_t monitor_w, untimed_w, timed_w;

  always_comb begin
    monitor_w = fmt_monitor(smp_i.stamp, smp_i.index);
    untimed_w = fmt_untimed(smp_i.value, smp_i.index);
    timed_w   = fmt_timed(smp_i.stamp, smp_i.index, smp_i.value);
    case (smp_i.sel)
      SEL_MONITOR: probe_o = monitor_w;
      SEL_UNTIMED: probe_o = untimed_w;
      default:     probe_o = timed_w;
    endcase
  end

endmodule
