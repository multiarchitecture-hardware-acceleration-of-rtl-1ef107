// hdc_neuralhd_kernel: the NeuralHD training design.
//
// NeuralHD alternates retraining with dimension regeneration. This design
// holds three independent kernels that the host drives in turn:
//   - encode: one encoding unit covering all D dimensions; features in,
//     encoded hypervectors out to the host (e_*), one element every NROWS
//     clocks, D*NROWS = 98000 clocks per vector at the defaults;
//   - fit: encoded hypervectors and labels back in from the host, retrained
//     against the class hypervectors with alpha = 0.037 (see
//     hdc_retrain_fit); classes are read back with cmd_read;
//   - regenerate: indices of dropped dimensions in (x_*); each gets a new
//     random basis vector and phase in the encoder and is zeroed in every
//     class (NROWS+2 clocks per index).
// The host computes the variance across classes and picks the dimensions to
// drop. While the regenerate unit is busy it owns the encoder's basis write
// port; otherwise the host's bw_*/bias_* load port does.
module hdc_neuralhd_kernel
  import hdc_pkg::*;
#(
  parameter int unsigned N_FEAT      = 784,
  parameter int unsigned D           = 2000,
  parameter int unsigned LANES       = 16,
  parameter int unsigned N_CLASS     = 10,
  parameter int unsigned CORDIC_ITER = 20,
  parameter logic [31:0] SEED        = 32'h1234_5678,
  localparam int unsigned NROWS = (N_FEAT + LANES - 1) / LANES,
  localparam int unsigned D_W   = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned ROW_W = (NROWS > 1) ? $clog2(NROWS) : 1,
  localparam int unsigned L_W   = (N_CLASS > 1) ? $clog2(N_CLASS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // host load of basis and phases
  input  logic               bw_en,
  input  logic [D_W-1:0]     bw_dim,
  input  logic [ROW_W-1:0]   bw_row,
  input  word_t [LANES-1:0]  bw_data,
  input  logic               bias_en,
  input  logic [D_W-1:0]     bias_dim,
  input  turns_t             bias_data,
  // encode
  input  logic               f_valid,
  output logic               f_ready,
  input  word_t [LANES-1:0]  f_data,
  output logic               e_valid,
  input  logic               e_ready,
  output word_t              e_data,
  output logic               e_last,
  // fit
  input  logic               cmd_clear,
  input  logic               cmd_read,
  input  logic               stats_clear,
  output logic               fit_busy,
  input  logic               cw_en,
  input  logic [L_W-1:0]     cw_class,
  input  logic [D_W-1:0]     cw_dim,
  input  word_t              cw_data,
  input  logic               l_valid,
  output logic               l_ready,
  input  logic [L_W-1:0]     l_label,
  input  logic               h_valid,
  output logic               h_ready,
  input  word_t              h_data,
  output logic               c_valid,
  input  logic               c_ready,
  output word_t              c_data,
  output logic               c_last,
  output logic [31:0]        n_samples,
  output logic [31:0]        n_miss,
  // regenerate
  input  logic               x_valid,
  output logic               x_ready,
  input  logic [D_W-1:0]     x_dim,
  output logic               regen_busy
);

  logic              r_bw_en, r_bias_en, z_en;
  logic [D_W-1:0]    r_bw_dim, r_bias_dim, z_dim;
  logic [ROW_W-1:0]  r_bw_row;
  word_t [LANES-1:0] r_bw_data;
  turns_t            r_bias_data;

  hdc_regen #(.D(D), .N_FEAT(N_FEAT), .LANES(LANES), .SEED(SEED)) u_regen (
    .clk, .rst_n, .x_valid, .x_ready, .x_dim, .busy(regen_busy),
    .bw_en(r_bw_en), .bw_dim(r_bw_dim), .bw_row(r_bw_row), .bw_data(r_bw_data),
    .bias_en(r_bias_en), .bias_dim(r_bias_dim), .bias_data(r_bias_data),
    .z_en, .z_dim
  );

  hdc_encoder_cu #(.N_FEAT(N_FEAT), .DIMS(D), .LANES(LANES), .CORDIC_ITER(CORDIC_ITER)) u_enc (
    .clk, .rst_n,
    .bw_en    (regen_busy ? r_bw_en     : bw_en),
    .bw_dim   (regen_busy ? r_bw_dim    : bw_dim),
    .bw_row   (regen_busy ? r_bw_row    : bw_row),
    .bw_data  (regen_busy ? r_bw_data   : bw_data),
    .bias_en  (regen_busy ? r_bias_en   : bias_en),
    .bias_dim (regen_busy ? r_bias_dim  : bias_dim),
    .bias_data(regen_busy ? r_bias_data : bias_data),
    .f_valid, .f_ready, .f_data,
    .h_valid(e_valid), .h_ready(e_ready), .h_data(e_data), .h_last(e_last)
  );

  hdc_retrain_fit #(.D(D), .N_CLASS(N_CLASS)) u_fit (
    .clk, .rst_n, .cmd_clear, .cmd_read, .stats_clear, .busy(fit_busy),
    .cw_en, .cw_class, .cw_dim, .cw_data, .z_en, .z_dim,
    .l_valid, .l_ready, .l_label, .i_valid(h_valid), .i_ready(h_ready), .i_data(h_data),
    .c_valid, .c_ready, .c_data, .c_last, .n_samples, .n_miss
  );

endmodule
