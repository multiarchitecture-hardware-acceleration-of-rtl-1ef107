// hdc_infer_kernel: the inference design.
//
// Feature vectors stream in from the host; the scatter stage hands each one
// to NUM_CU encoding compute units, which encode D/NUM_CU dimensions each in
// parallel; every unit's elements flow through its own pipe to the gather,
// which reassembles the hypervector; the classifier scores it against the
// N_CLASS class hypervectors and streams the predicted class back.
//
// Timing at the defaults (784 features, 16 lanes, 80 dimensions per unit):
// 49 clocks to load a vector, 49 clocks per dimension, so about
// 49 + 80*49 = 3969 clocks per vector plus a trig and gather tail of a few
// dozen clocks. The next vector loads while the tail drains.
//
// Ports: bw_*/bias_* write the basis and phases, addressed by global
// dimension (the kernel routes each write to its unit); cw_* write the
// normalised class hypervectors; f_* feature rows; p_* predictions.
// The unit count (25) follows the reference design; the rest are this
// design's choices, see the leaf modules.
module hdc_infer_kernel
  import hdc_pkg::*;
#(
  parameter int unsigned N_FEAT      = 784,
  parameter int unsigned D           = 2000,
  parameter int unsigned NUM_CU      = 25,
  parameter int unsigned LANES       = 16,
  parameter int unsigned N_CLASS     = 10,
  parameter int unsigned PIPE_DEPTH  = 4,
  parameter int unsigned CORDIC_ITER = 20,
  localparam int unsigned DPC   = D / NUM_CU,
  localparam int unsigned NROWS = (N_FEAT + LANES - 1) / LANES,
  localparam int unsigned D_W   = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned LD_W  = (DPC > 1) ? $clog2(DPC) : 1,
  localparam int unsigned ROW_W = (NROWS > 1) ? $clog2(NROWS) : 1,
  localparam int unsigned L_W   = (N_CLASS > 1) ? $clog2(N_CLASS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bw_en,
  input  logic [D_W-1:0]     bw_dim,
  input  logic [ROW_W-1:0]   bw_row,
  input  word_t [LANES-1:0]  bw_data,
  input  logic               bias_en,
  input  logic [D_W-1:0]     bias_dim,
  input  turns_t             bias_data,
  input  logic               cw_en,
  input  logic [L_W-1:0]     cw_class,
  input  logic [D_W-1:0]     cw_dim,
  input  word_t              cw_data,
  input  logic               f_valid,
  output logic               f_ready,
  input  word_t [LANES-1:0]  f_data,
  output logic               p_valid,
  input  logic               p_ready,
  output logic [L_W-1:0]     p_class
);

  initial assert (DPC * NUM_CU == D) else $error("D must be a multiple of NUM_CU");

  logic [NUM_CU-1:0] cu_f_valid, cu_f_ready;
  word_t [LANES-1:0] cu_f_data;
  logic [NUM_CU-1:0] cu_h_valid, cu_h_ready;
  word_t [NUM_CU-1:0] cu_h_data;
  logic [NUM_CU-1:0] pp_valid, pp_ready;
  word_t [NUM_CU-1:0] pp_data;
  logic              g_valid, g_ready, g_last;
  word_t             g_data;
  logic [D_W-1:0]    g_dim;

  hdc_scatter #(.NUM_CU(NUM_CU), .LANES(LANES)) u_scatter (
    .clk, .rst_n, .s_valid(f_valid), .s_ready(f_ready), .s_data(f_data),
    .m_valid(cu_f_valid), .m_ready(cu_f_ready), .m_data(cu_f_data)
  );

  for (genvar c = 0; c < NUM_CU; c++) begin : g_cu
    hdc_encoder_cu #(.N_FEAT(N_FEAT), .DIMS(DPC), .LANES(LANES), .CORDIC_ITER(CORDIC_ITER)) u_cu (
      .clk, .rst_n,
      .bw_en    (bw_en && (32'(bw_dim) / DPC == c)),
      .bw_dim   (LD_W'(32'(bw_dim) % DPC)),
      .bw_row,
      .bw_data,
      .bias_en  (bias_en && (32'(bias_dim) / DPC == c)),
      .bias_dim (LD_W'(32'(bias_dim) % DPC)),
      .bias_data,
      .f_valid  (cu_f_valid[c]),
      .f_ready  (cu_f_ready[c]),
      .f_data   (cu_f_data),
      .h_valid  (cu_h_valid[c]),
      .h_ready  (cu_h_ready[c]),
      .h_data   (cu_h_data[c]),
      .h_last   ()   // the gather counts dimensions itself
    );
    hdc_pipe #(.W(WORD_W), .DEPTH(PIPE_DEPTH)) u_pipe (
      .clk, .rst_n,
      .in_valid (cu_h_valid[c]),
      .in_ready (cu_h_ready[c]),
      .in_data  (cu_h_data[c]),
      .out_valid(pp_valid[c]),
      .out_ready(pp_ready[c]),
      .out_data (pp_data[c])
    );
  end

  hdc_gather #(.NUM_CU(NUM_CU), .DPC(DPC)) u_gather (
    .clk, .rst_n, .i_valid(pp_valid), .i_ready(pp_ready), .i_data(pp_data),
    .o_valid(g_valid), .o_ready(g_ready), .o_data(g_data), .o_dim(g_dim), .o_last(g_last)
  );

  hdc_classify #(.D(D), .N_CLASS(N_CLASS)) u_classify (
    .clk, .rst_n, .i_valid(g_valid), .i_ready(g_ready), .i_data(g_data), .i_dim(g_dim),
    .i_last(g_last), .cw_en, .cw_class, .cw_dim, .cw_data, .p_valid, .p_ready, .p_class
  );

endmodule
