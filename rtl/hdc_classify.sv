// hdc_classify: similarity search of the inference design.
//
// For an encoded hypervector H it computes the score H . C_j for every class
// j and reports the class with the highest score. With class hypervectors
// normalised to unit length beforehand, the cosine similarity
// H . C_j / (|H| |C_j|) differs from H . C_j only by the factor 1/|H|, which
// is the same for every class, so the dot product alone picks the same class.
//
// How it works. The class memory holds one row per dimension with the
// N_CLASS class elements side by side. Each element h_d that arrives reads
// row d (one clock) and the next clock adds h_d * C_j,d to all N_CLASS 64-bit
// accumulators at once. Elements may arrive in any dimension order. After
// the element flagged last, the argmax is taken (lowest class index on a
// tie) and offered on the p_* stream; the accumulators are cleared when the
// prediction is taken, and only then are new elements accepted.
//
// Interface: i_* element stream with its dimension (from the gather), cw_*
// class-memory write port for the host, p_* prediction stream. Throughput
// is one element per clock. Similarity by dot product against normalised
// classes and argmax follow the reference design; the memory layout,
// fixed point and timing are this design's choices.
module hdc_classify
  import hdc_pkg::*;
#(
  parameter int unsigned D       = 2000,  // hypervector dimensions
  parameter int unsigned N_CLASS = 10,
  localparam int unsigned D_W    = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned L_W    = (N_CLASS > 1) ? $clog2(N_CLASS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               i_valid,
  output logic               i_ready,
  input  word_t              i_data,
  input  logic [D_W-1:0]     i_dim,
  input  logic               i_last,
  input  logic               cw_en,
  input  logic [L_W-1:0]     cw_class,
  input  logic [D_W-1:0]     cw_dim,
  input  word_t              cw_data,
  output logic               p_valid,
  input  logic               p_ready,
  output logic [L_W-1:0]     p_class
);

  word_t [N_CLASS-1:0] cmem [D];

  typedef enum logic [1:0] {S_ACC, S_DRAIN, S_OUT} state_t;
  state_t state;

  logic                rd_valid;
  word_t               rd_h;
  word_t [N_CLASS-1:0] rd_row;
  acc_t                score [N_CLASS];
  logic                take;

  assign i_ready = (state == S_ACC);
  assign take    = i_valid && i_ready;

  always_ff @(posedge clk) begin
    if (cw_en) cmem[cw_dim][cw_class] <= cw_data;
    if (take)  rd_row <= cmem[i_dim];
  end

  // argmax over the finished scores, lowest index wins a tie
  logic [L_W-1:0] best;
  always_comb begin
    best = '0;
    for (int j = 1; j < N_CLASS; j++)
      if (score[j] > score[best]) best = L_W'(j);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_ACC;
      rd_valid <= 1'b0;
      rd_h     <= '0;
      p_valid  <= 1'b0;
      p_class  <= '0;
      for (int j = 0; j < N_CLASS; j++) score[j] <= '0;
    end else begin
      rd_valid <= take;
      if (take) begin
        rd_h    <= i_data;
      end
      if (rd_valid)
        for (int j = 0; j < N_CLASS; j++) score[j] <= score[j] + mul_q(rd_h, rd_row[j]);
      unique case (state)
        S_ACC:   if (take && i_last) state <= S_DRAIN;
        S_DRAIN: if (!rd_valid) begin
          p_class <= best;
          p_valid <= 1'b1;
          state   <= S_OUT;
        end
        S_OUT:   if (p_ready) begin
          p_valid <= 1'b0;
          for (int j = 0; j < N_CLASS; j++) score[j] <= '0;
          state   <= S_ACC;
        end
        default: state <= S_ACC;
      endcase
    end
  end

endmodule
