// hdc_train_kernel: the single-pass training design.
//
// Training feature vectors stream in from the host and are scattered to
// NUM_CU encoding compute units (fewer than for inference, because the
// class memory that training writes competes for on-chip RAM). The pipes and
// the gather reassemble each encoded hypervector, and the fitting kernel
// adds it into the class named by the sample's label. After the training
// set the host issues cmd_read and receives the class hypervectors, which
// it normalises itself.
//
// Timing at the defaults (784 features, 16 lanes, 250 dimensions per unit):
// about 49 + 250*49 = 12299 clocks per training vector.
//
// Ports: bw_*/bias_* basis and phase load by global dimension; f_* feature
// rows; l_* labels, one per vector, in the same order; cmd_clear, cmd_read,
// busy and the c_* class stream of the fitting kernel. The unit count (8)
// follows the reference design.
module hdc_train_kernel
  import hdc_pkg::*;
#(
  parameter int unsigned N_FEAT      = 784,
  parameter int unsigned D           = 2000,
  parameter int unsigned NUM_CU      = 8,
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
  input  logic               f_valid,
  output logic               f_ready,
  input  word_t [LANES-1:0]  f_data,
  input  logic               l_valid,
  output logic               l_ready,
  input  logic [L_W-1:0]     l_label,
  input  logic               cmd_clear,
  input  logic               cmd_read,
  output logic               busy,
  output logic               c_valid,
  input  logic               c_ready,
  output word_t              c_data,
  output logic               c_last
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

  hdc_bundle_fit #(.D(D), .N_CLASS(N_CLASS)) u_fit (
    .clk, .rst_n, .cmd_clear, .cmd_read, .busy, .l_valid, .l_ready, .l_label,
    .i_valid(g_valid), .i_ready(g_ready), .i_data(g_data), .i_dim(g_dim), .i_last(g_last),
    .c_valid, .c_ready, .c_data, .c_last
  );

endmodule
