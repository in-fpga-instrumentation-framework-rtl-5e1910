// ie_monitor: the monitor of an instrument engine, a clock-cycle-accurate
// timer.
//
// A TS_W-bit counter is cleared by reset and advances by one on every clock
// edge, returning to zero after its all-ones value.  Every sample the
// instrument accepts is stamped with this count, so differences between
// stamps are exact numbers of kernel clock cycles.  The 32-bit width and the
// clear-on-reset / wrap behaviour follow the engine's published description;
// the comparison against the all-ones value is kept explicit so that a
// smaller wrap point can be set through WRAP_AT.
//
// Interface: clk, rst_n (asynchronous, active low), time_o (current count).
// Timing: time_o is the number of rising edges since reset, modulo WRAP_AT+1.
module ie_monitor #(
  parameter int unsigned    TS_W    = ie_pkg::TS_W,
  parameter logic [TS_W-1:0] WRAP_AT = '1
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [TS_W-1:0] time_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 time_o <= '0;
    else if (time_o == WRAP_AT) time_o <= '0;
    else                        time_o <= time_o + 1'b1;
  end

endmodule
