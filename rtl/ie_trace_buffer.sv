// ie_trace_buffer: trace buffer and downstream interface of an instrument
// engine.
//
// Probe words enter with in_valid/in_ready and leave towards the downstream
// kernel with ovalid/iready.  The buffer is a DEPTH-entry first-in first-out
// memory with fall-through: when it is empty and the downstream side is
// ready, an incoming word passes straight to the output in the same cycle,
// so an unstalled instrument adds no cycle here.  While ovalid is high and
// iready low the word on probe is held unchanged until the next cycle and
// later words queue behind it; in_ready falls only when all DEPTH entries
// are in use.  The engine description places a trace buffer between the
// probe multiplexer and the downstream interface and requires the hold
// behaviour; the FIFO organisation, fall-through and DEPTH are this design's
// choices.
//
// in_ready depends only on the fill level, never on in_valid or iready.
module ie_trace_buffer
  import ie_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  probe_t in_data,
  output logic   ovalid,
  input  logic   iready,
  output probe_t probe
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  probe_t              mem [DEPTH];
  logic [AW-1:0]       wptr, rptr;
  logic [CW-1:0]       count;
  logic                empty, push, pop;

  assign empty    = (count == 0);
  assign in_ready = (count != CW'(DEPTH));
  assign ovalid   = !empty || in_valid;
  assign probe    = empty ? in_data : mem[rptr];
  assign pop      = !empty && iready;
  // a word that bypasses an empty buffer is not stored
  assign push     = in_valid && in_ready && !(empty && iready);

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= nxt(wptr);
      if (pop)  rptr <= nxt(rptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
  end

  // Downstream hold rule: a word offered and not taken is offered again,
  // unchanged, in the next cycle.
  logic   held_q;
  probe_t held_data_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_q      <= 1'b0;
      held_data_q <= '0;
    end else begin
      if (held_q)
        assert (ovalid && probe == held_data_q)
          else $error("trace buffer dropped or changed a held probe word");
      held_q      <= ovalid && !iready;
      held_data_q <= probe;
    end
  end

endmodule
