// sk_kernel: instrumented single-kernel use case, a single work-item
// pipeline computing, for every work-item i,
//   a = x[i]; b = y[i]; add = a + b; mul = add * a; z[i] = mul
// with four instruments: I1 samples a and I2 samples b when they are
// loaded, I3 samples add when the addition is done and I4 samples mul when
// it is stored.
//
// Pipeline: the load stage accepts (x, y) with in_valid/in_ready; one stage
// forms the sum; the product takes MUL_LAT further stages; the last stage
// offers z with z_valid/z_ready.  The whole pipeline moves together: it
// advances in a cycle when its last stage is empty or z is taken, and every
// instrument is ready (a stall-enable pipeline, as an OpenCL compiler builds
// one).  A bubble in the input stream or a stalled store therefore shows up
// as a longer gap between the time stamps of consecutive work-items.
// The loop index i counts the loaded work-items from 0 and is the index
// passed to every instrument; each instrument samples the low 16 bits of its
// 32-bit variable.  The selector of all four instruments is the sel input
// (the use case calls them with 2, the timed probe).
//
// Timing without stalls: I3 samples one cycle after I1/I2, I4 samples
// MUL_LAT cycles after I3 (3 by default, the multiplication latency the
// framework measured), and one work-item enters per cycle (II = 1).
// The algorithm and the instrument points follow the use case; the 1-cycle
// addition, the global stall and the index width are this design's choices.
module sk_kernel
  import ie_pkg::*;
#(
  parameter int unsigned MUL_LAT  = 3,
  parameter int unsigned TB_DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  sel_t         sel,
  // load: x[i], y[i]
  input  logic         in_valid,
  output logic         in_ready,
  input  data_t        x,
  input  data_t        y,
  // store: z[i]
  output logic         z_valid,
  input  logic         z_ready,
  output data_t        z,
  // instrument probe streams I1..I4 (index 0..3)
  output logic [3:0]   tr_valid,
  input  logic [3:0]   tr_ready,
  output probe_t [3:0] tr_probe
);

  localparam int unsigned NI = 4;

  logic [NI-1:0] ie_ivalid, ie_oready;
  var_t [NI-1:0] ie_value;
  idx_t [NI-1:0] ie_index;
  logic          adv, load;

  // stage 1: sum
  logic  v1;
  data_t a1, add1;
  idx_t  i1;
  // multiplier stages 2 .. MUL_LAT+1
  logic  [MUL_LAT-1:0] vm;
  data_t [MUL_LAT-1:0] pm;
  idx_t  [MUL_LAT-1:0] im;
  idx_t  i_next;

  assign adv      = (!vm[MUL_LAT-1] || z_ready) && (&ie_oready);
  assign in_ready = adv;
  assign load     = in_valid && adv;

  assign z_valid  = vm[MUL_LAT-1] && (&ie_oready);
  assign z        = pm[MUL_LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      a1     <= '0;
      add1   <= '0;
      i1     <= '0;
      vm     <= '0;
      pm     <= '0;
      im     <= '0;
      i_next <= '0;
    end else if (adv) begin
      v1   <= in_valid;
      a1   <= x;
      add1 <= x + y;
      i1   <= i_next;
      if (load) i_next <= i_next + 1'b1;
      vm[0] <= v1;
      pm[0] <= add1 * a1;
      im[0] <= i1;
      for (int s = 1; s < MUL_LAT; s++) begin
        vm[s] <= vm[s-1];
        pm[s] <= pm[s-1];
        im[s] <= im[s-1];
      end
    end
  end

  // instrument calls: I1(a), I2(b) at load, I3(add) leaving the sum stage,
  // I4(mul) at the store
  always_comb begin
    ie_ivalid[0] = load;
    ie_value[0]  = var_t'(x);
    ie_index[0]  = i_next;
    ie_ivalid[1] = load;
    ie_value[1]  = var_t'(y);
    ie_index[1]  = i_next;
    ie_ivalid[2] = v1 && adv;
    ie_value[2]  = var_t'(add1);
    ie_index[2]  = i1;
    ie_ivalid[3] = vm[MUL_LAT-1] && adv;
    ie_value[3]  = var_t'(pm[MUL_LAT-1]);
    ie_index[3]  = im[MUL_LAT-1];
  end

  for (genvar n = 0; n < NI; n++) begin : g_ie
    instrument_engine #(.TB_DEPTH(TB_DEPTH)) u_ie (
      .clk    (clk),
      .rst_n  (rst_n),
      .ivalid (ie_ivalid[n]),
      .oready (ie_oready[n]),
      .sel    (sel),
      .index  (ie_index[n]),
      .value  (ie_value[n]),
      .ovalid (tr_valid[n]),
      .iready (tr_ready[n]),
      .probe  (tr_probe[n])
    );
  end

endmodule
