// mk_system: instrumented multikernel use case.  The single-kernel
// algorithm is split into three kernels joined by OpenCL pipes:
//
//   load_data   : a = x[i]; b = y[i]; I1(a); I2(b); write Load_A, Load_B
//   inFPGA ops  : read Load_A, Load_B; I3(Ain); I4(Bin);
//                 Sum = Ain + Bin; Mul = Bin * Sum; I5(Mul); write Mul_OUT
//   store_data  : read Mul_OUT; I6(last_val); z[i] = last_val
//
// Each kernel keeps its own loop index i, counted from 0, and passes it to
// its instruments; all six instruments use the sel input as selector.
// A kernel moves a work-item only when everything it writes can take it and
// all instruments it calls are ready, so the load kernel stalls on a full
// Load_A/Load_B pipe, the compute kernel on an empty Load pipe or a full
// Mul_OUT pipe, and the store kernel on an empty Mul_OUT pipe or a stalled
// z output.  Such stalls appear as irregular gaps between the time stamps
// of consecutive work-items in the instruments around the pipe.
//
// Timing without stalls: I3/I4 sample one cycle after I1/I2 (pipe
// latency), I5 one cycle after I3/I4 (the compute latency), I6 one cycle
// after I5, and every kernel handles one work-item per cycle.
// The kernels, pipes and instrument points follow the use case; the pipe
// depth PIPE_DEPTH and the one-stage compute kernel are this design's
// choices.
module mk_system
  import ie_pkg::*;
#(
  parameter int unsigned PIPE_DEPTH = 8,
  parameter int unsigned TB_DEPTH   = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  sel_t         sel,
  // load_data inputs x[i], y[i]
  input  logic         in_valid,
  output logic         in_ready,
  input  data_t        x,
  input  data_t        y,
  // store_data output z[i]
  output logic         z_valid,
  input  logic         z_ready,
  output data_t        z,
  // instrument probe streams I1..I6 (index 0..5)
  output logic [5:0]   tr_valid,
  input  logic [5:0]   tr_ready,
  output probe_t [5:0] tr_probe
);

  localparam int unsigned NI = 6;

  logic [NI-1:0] ie_ivalid, ie_oready;
  var_t [NI-1:0] ie_value;
  idx_t [NI-1:0] ie_index;

  // ---------------------------------------------------------------- load_data
  logic  la_in_ready, lb_in_ready, load_go;
  idx_t  ld_i;

  assign load_go  = in_valid && la_in_ready && lb_in_ready &&
                    ie_oready[0] && ie_oready[1];
  assign in_ready = la_in_ready && lb_in_ready && ie_oready[0] && ie_oready[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ld_i <= '0;
    else if (load_go) ld_i <= ld_i + 1'b1;
  end

  // ------------------------------------------------------------------- pipes
  logic  la_valid, lb_valid, comp_go;
  data_t ain, bin;

  ocl_pipe #(.W(DATA_W), .DEPTH(PIPE_DEPTH)) u_load_a (
    .clk (clk), .rst_n (rst_n),
    .in_valid (load_go), .in_ready (la_in_ready), .in_data (x),
    .out_valid (la_valid), .out_ready (comp_go), .out_data (ain)
  );

  ocl_pipe #(.W(DATA_W), .DEPTH(PIPE_DEPTH)) u_load_b (
    .clk (clk), .rst_n (rst_n),
    .in_valid (load_go), .in_ready (lb_in_ready), .in_data (y),
    .out_valid (lb_valid), .out_ready (comp_go), .out_data (bin)
  );

  // -------------------------------------------------------------- inFPGA ops
  logic  vq, mo_in_ready, push_mul, stage_free;
  data_t mul_q;
  idx_t  cq_i, cp_i;

  assign push_mul   = vq && mo_in_ready && ie_oready[4];
  assign stage_free = !vq || push_mul;
  assign comp_go    = la_valid && lb_valid && stage_free &&
                      ie_oready[2] && ie_oready[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vq    <= 1'b0;
      mul_q <= '0;
      cq_i  <= '0;
      cp_i  <= '0;
    end else begin
      if (comp_go) begin
        vq    <= 1'b1;
        mul_q <= bin * (ain + bin);
        cq_i  <= cp_i;
        cp_i  <= cp_i + 1'b1;
      end else if (push_mul) begin
        vq    <= 1'b0;
      end
    end
  end

  // -------------------------------------------------------------- store_data
  logic  mo_valid, st_go;
  data_t last_val;
  idx_t  st_i;

  ocl_pipe #(.W(DATA_W), .DEPTH(PIPE_DEPTH)) u_mul_out (
    .clk (clk), .rst_n (rst_n),
    .in_valid (push_mul), .in_ready (mo_in_ready), .in_data (mul_q),
    .out_valid (mo_valid), .out_ready (st_go), .out_data (last_val)
  );

  assign z_valid = mo_valid && ie_oready[5];
  assign z       = last_val;
  assign st_go   = z_valid && z_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     st_i <= '0;
    else if (st_go) st_i <= st_i + 1'b1;
  end

  // ------------------------------------------------------------ instruments
  always_comb begin
    ie_ivalid[0] = load_go;              ie_value[0] = var_t'(x);        ie_index[0] = ld_i;
    ie_ivalid[1] = load_go;              ie_value[1] = var_t'(y);        ie_index[1] = ld_i;
    ie_ivalid[2] = comp_go;              ie_value[2] = var_t'(ain);      ie_index[2] = cp_i;
    ie_ivalid[3] = comp_go;              ie_value[3] = var_t'(bin);      ie_index[3] = cp_i;
    ie_ivalid[4] = vq && mo_in_ready;    ie_value[4] = var_t'(mul_q);    ie_index[4] = cq_i;
    ie_ivalid[5] = mo_valid && z_ready;  ie_value[5] = var_t'(last_val); ie_index[5] = st_i;
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
