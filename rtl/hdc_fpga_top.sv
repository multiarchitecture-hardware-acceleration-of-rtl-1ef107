// hdc_fpga_top: the three FPGA designs of the hyperdimensional-computing
// classifier, side by side.
//
// The accelerator classifies feature vectors (28x28 images, 784 features)
// with a 2000-dimensional HDC model of 10 classes. It comes as three
// designs that share the encoder and the class-hypervector arithmetic but
// are built separately, each with its own ports here:
//   inf_*  inference: 25 encoding units, classification (hdc_infer_kernel);
//   spt_*  single-pass training: 8 encoding units, bundling of classes
//          (hdc_train_kernel);
//   nhd_*  NeuralHD training: one encoder, retraining fit kernel and
//          dimension regeneration (hdc_neuralhd_kernel).
// All host traffic (feature vectors, labels, model load and readback) is
// brought out as valid/ready streams and write ports; the host link itself
// and the host's own steps (normalising classes, computing the variance
// that selects dropped dimensions) are outside this RTL.
module hdc_fpga_top
  import hdc_pkg::*;
#(
  parameter int unsigned N_FEAT      = 784,
  parameter int unsigned D           = 2000,
  parameter int unsigned N_CLASS     = 10,
  parameter int unsigned LANES       = 16,
  parameter int unsigned INF_CU      = 25,
  parameter int unsigned SPT_CU      = 8,
  parameter int unsigned CORDIC_ITER = 20,
  localparam int unsigned NROWS = (N_FEAT + LANES - 1) / LANES,
  localparam int unsigned D_W   = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned ROW_W = (NROWS > 1) ? $clog2(NROWS) : 1,
  localparam int unsigned L_W   = (N_CLASS > 1) ? $clog2(N_CLASS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // ---------------- inference ----------------
  input  logic               inf_bw_en,
  input  logic [D_W-1:0]     inf_bw_dim,
  input  logic [ROW_W-1:0]   inf_bw_row,
  input  word_t [LANES-1:0]  inf_bw_data,
  input  logic               inf_bias_en,
  input  logic [D_W-1:0]     inf_bias_dim,
  input  turns_t             inf_bias_data,
  input  logic               inf_cw_en,
  input  logic [L_W-1:0]     inf_cw_class,
  input  logic [D_W-1:0]     inf_cw_dim,
  input  word_t              inf_cw_data,
  input  logic               inf_f_valid,
  output logic               inf_f_ready,
  input  word_t [LANES-1:0]  inf_f_data,
  output logic               inf_p_valid,
  input  logic               inf_p_ready,
  output logic [L_W-1:0]     inf_p_class,
  // ---------------- single-pass training ----------------
  input  logic               spt_bw_en,
  input  logic [D_W-1:0]     spt_bw_dim,
  input  logic [ROW_W-1:0]   spt_bw_row,
  input  word_t [LANES-1:0]  spt_bw_data,
  input  logic               spt_bias_en,
  input  logic [D_W-1:0]     spt_bias_dim,
  input  turns_t             spt_bias_data,
  input  logic               spt_f_valid,
  output logic               spt_f_ready,
  input  word_t [LANES-1:0]  spt_f_data,
  input  logic               spt_l_valid,
  output logic               spt_l_ready,
  input  logic [L_W-1:0]     spt_l_label,
  input  logic               spt_cmd_clear,
  input  logic               spt_cmd_read,
  output logic               spt_busy,
  output logic               spt_c_valid,
  input  logic               spt_c_ready,
  output word_t              spt_c_data,
  output logic               spt_c_last,
  // ---------------- NeuralHD training ----------------
  input  logic               nhd_bw_en,
  input  logic [D_W-1:0]     nhd_bw_dim,
  input  logic [ROW_W-1:0]   nhd_bw_row,
  input  word_t [LANES-1:0]  nhd_bw_data,
  input  logic               nhd_bias_en,
  input  logic [D_W-1:0]     nhd_bias_dim,
  input  turns_t             nhd_bias_data,
  input  logic               nhd_f_valid,
  output logic               nhd_f_ready,
  input  word_t [LANES-1:0]  nhd_f_data,
  output logic               nhd_e_valid,
  input  logic               nhd_e_ready,
  output word_t              nhd_e_data,
  output logic               nhd_e_last,
  input  logic               nhd_cmd_clear,
  input  logic               nhd_cmd_read,
  input  logic               nhd_stats_clear,
  output logic               nhd_fit_busy,
  input  logic               nhd_cw_en,
  input  logic [L_W-1:0]     nhd_cw_class,
  input  logic [D_W-1:0]     nhd_cw_dim,
  input  word_t              nhd_cw_data,
  input  logic               nhd_l_valid,
  output logic               nhd_l_ready,
  input  logic [L_W-1:0]     nhd_l_label,
  input  logic               nhd_h_valid,
  output logic               nhd_h_ready,
  input  word_t              nhd_h_data,
  output logic               nhd_c_valid,
  input  logic               nhd_c_ready,
  output word_t              nhd_c_data,
  output logic               nhd_c_last,
  output logic [31:0]        nhd_n_samples,
  output logic [31:0]        nhd_n_miss,
  input  logic               nhd_x_valid,
  output logic               nhd_x_ready,
  input  logic [D_W-1:0]     nhd_x_dim,
  output logic               nhd_regen_busy
);

  hdc_infer_kernel #(
    .N_FEAT(N_FEAT), .D(D), .NUM_CU(INF_CU), .LANES(LANES), .N_CLASS(N_CLASS),
    .CORDIC_ITER(CORDIC_ITER)
  ) u_infer (
    .clk, .rst_n,
    .bw_en(inf_bw_en), .bw_dim(inf_bw_dim), .bw_row(inf_bw_row), .bw_data(inf_bw_data),
    .bias_en(inf_bias_en), .bias_dim(inf_bias_dim), .bias_data(inf_bias_data),
    .cw_en(inf_cw_en), .cw_class(inf_cw_class), .cw_dim(inf_cw_dim), .cw_data(inf_cw_data),
    .f_valid(inf_f_valid), .f_ready(inf_f_ready), .f_data(inf_f_data),
    .p_valid(inf_p_valid), .p_ready(inf_p_ready), .p_class(inf_p_class)
  );

  hdc_train_kernel #(
    .N_FEAT(N_FEAT), .D(D), .NUM_CU(SPT_CU), .LANES(LANES), .N_CLASS(N_CLASS),
    .CORDIC_ITER(CORDIC_ITER)
  ) u_train (
    .clk, .rst_n,
    .bw_en(spt_bw_en), .bw_dim(spt_bw_dim), .bw_row(spt_bw_row), .bw_data(spt_bw_data),
    .bias_en(spt_bias_en), .bias_dim(spt_bias_dim), .bias_data(spt_bias_data),
    .f_valid(spt_f_valid), .f_ready(spt_f_ready), .f_data(spt_f_data),
    .l_valid(spt_l_valid), .l_ready(spt_l_ready), .l_label(spt_l_label),
    .cmd_clear(spt_cmd_clear), .cmd_read(spt_cmd_read), .busy(spt_busy),
    .c_valid(spt_c_valid), .c_ready(spt_c_ready), .c_data(spt_c_data), .c_last(spt_c_last)
  );

  hdc_neuralhd_kernel #(
    .N_FEAT(N_FEAT), .D(D), .LANES(LANES), .N_CLASS(N_CLASS), .CORDIC_ITER(CORDIC_ITER)
  ) u_neuralhd (
    .clk, .rst_n,
    .bw_en(nhd_bw_en), .bw_dim(nhd_bw_dim), .bw_row(nhd_bw_row), .bw_data(nhd_bw_data),
    .bias_en(nhd_bias_en), .bias_dim(nhd_bias_dim), .bias_data(nhd_bias_data),
    .f_valid(nhd_f_valid), .f_ready(nhd_f_ready), .f_data(nhd_f_data),
    .e_valid(nhd_e_valid), .e_ready(nhd_e_ready), .e_data(nhd_e_data), .e_last(nhd_e_last),
    .cmd_clear(nhd_cmd_clear), .cmd_read(nhd_cmd_read), .stats_clear(nhd_stats_clear),
    .fit_busy(nhd_fit_busy),
    .cw_en(nhd_cw_en), .cw_class(nhd_cw_class), .cw_dim(nhd_cw_dim), .cw_data(nhd_cw_data),
    .l_valid(nhd_l_valid), .l_ready(nhd_l_ready), .l_label(nhd_l_label),
    .h_valid(nhd_h_valid), .h_ready(nhd_h_ready), .h_data(nhd_h_data),
    .c_valid(nhd_c_valid), .c_ready(nhd_c_ready), .c_data(nhd_c_data), .c_last(nhd_c_last),
    .n_samples(nhd_n_samples), .n_miss(nhd_n_miss),
    .x_valid(nhd_x_valid), .x_ready(nhd_x_ready), .x_dim(nhd_x_dim), .regen_busy(nhd_regen_busy)
  );

endmodule
