// hdc_regen: dimension drop-and-regenerate unit of the NeuralHD design.
//
// Between retraining rounds the host ranks the hypervector dimensions by
// the variance of the class elements across classes and sends the indices
// of the least useful ones. For each index this unit gives that dimension a
// fresh random basis vector and a fresh random phase in the encoder, and
// zeroes the dimension in every class hypervector, so the dimension starts
// learning again from scratch.
//
// How it works. LANES+1 xorshift32 generators run in parallel. For one index
// the unit writes the NROWS basis rows, one row of LANES words per clock,
// each word uniform in [-1, 1) (a sign-extended 17-bit slice of its
// generator), then in one more clock writes the phase (a full 32-bit random
// angle, uniform over one turn) and pulses the class-zeroing strobe. One
// index therefore takes NROWS+1 clocks, plus one to accept it.
//
// Interface: x_* index stream from the host, bw_*/bias_* write port of the
// encoder's basis memory, z_en/z_dim to the fitting kernel, busy. Dropping,
// regenerating and zeroing follow the reference design; the uniform
// distribution, the generator and SEED are this design's choices.
module hdc_regen
  import hdc_pkg::*;
#(
  parameter int unsigned D      = 2000,
  parameter int unsigned N_FEAT = 784,
  parameter int unsigned LANES  = 16,
  parameter logic [31:0] SEED   = 32'h1234_5678,
  localparam int unsigned NROWS = (N_FEAT + LANES - 1) / LANES,
  localparam int unsigned D_W   = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned ROW_W = (NROWS > 1) ? $clog2(NROWS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               x_valid,
  output logic               x_ready,
  input  logic [D_W-1:0]     x_dim,
  output logic               busy,
  output logic               bw_en,
  output logic [D_W-1:0]     bw_dim,
  output logic [ROW_W-1:0]   bw_row,
  output word_t [LANES-1:0]  bw_data,
  output logic               bias_en,
  output logic [D_W-1:0]     bias_dim,
  output turns_t             bias_data,
  output logic               z_en,
  output logic [D_W-1:0]     z_dim
);

  function automatic logic [31:0] xorshift32(input logic [31:0] s);
    logic [31:0] t;
    t = s ^ (s << 13);
    t = t ^ (t >> 17);
    return t ^ (t << 5);
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_ROWS, S_BIAS} state_t;
  state_t state;

  logic [31:0]      rng [LANES+1];
  logic [D_W-1:0]   dim;
  logic [ROW_W-1:0] row;

  assign x_ready   = (state == S_IDLE);
  assign busy      = (state != S_IDLE);
  assign bw_en     = (state == S_ROWS);
  assign bw_dim    = dim;
  assign bw_row    = row;
  assign bias_en   = (state == S_BIAS);
  assign bias_dim  = dim;
  assign bias_data = rng[LANES];
  assign z_en      = (state == S_BIAS);
  assign z_dim     = dim;

  always_comb
    for (int l = 0; l < LANES; l++)
      bw_data[l] = {{15{rng[l][16]}}, rng[l][16:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      dim   <= '0;
      row   <= '0;
      // distinct non-zero seeds per generator
      for (int l = 0; l <= LANES; l++) rng[l] <= (SEED ^ (32'h9E37_79B9 * 32'(l + 1))) | 32'h1;
    end else begin
      unique case (state)
        S_IDLE: if (x_valid) begin
          dim   <= x_dim;
          row   <= '0;
          state <= S_ROWS;
        end
        S_ROWS: begin
          for (int l = 0; l < LANES; l++) rng[l] <= xorshift32(rng[l]);
          if (32'(row) == NROWS - 1) state <= S_BIAS;
          else                       row <= row + 1'b1;
        end
        S_BIAS: begin
          rng[LANES] <= xorshift32(rng[LANES]);
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
