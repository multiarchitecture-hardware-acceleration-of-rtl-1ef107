// hdc_encoder_cu: one encoding compute unit of the RBF encoder.
//
// For every dimension i it owns, the unit computes
//     h_i = cos(B_i . F + b_i) * sin(B_i . F)
// where B_i is that dimension's basis vector, b_i its random phase and F the
// feature vector. Several units work side by side, each on its own slice of
// the hypervector, and all receive the same feature vector.
//
// How it works. The feature vector arrives as NROWS beats of LANES words and
// is kept in a register buffer. The basis slice is a memory of DIMS*NROWS
// rows, each LANES words wide. The MAC stage reads one basis row per clock,
// multiplies it lane by lane with the matching feature row and accumulates,
// so one dot product takes NROWS clocks. The finished dot product (radians,
// Q.32) is turned into an angle in turns with one constant multiply, the
// phase b_i (stored in turns) is added, and two CORDIC units produce
// cos(x+b) and sin(x) at once; their product is the element h_i. The trig
// stage overlaps the next dot product, so while it is shorter than NROWS
// clocks the unit delivers one element every NROWS clocks.
//
// Interface. Basis rows and phases are written through bw_*/bias_* while the
// unit is idle (host load, or dimension regeneration). Features come in on
// the f_* valid/ready stream, rows 0..NROWS-1 in order; elements leave on the
// h_* valid/ready stream in dimension order, h_last marking the unit's last
// dimension. The feature buffer is free again once the last basis row has
// been read, so the next vector may load while the last elements finish.
//
// Only the cosine of the first CORDIC and the sine of the second are used,
// and only bits [63:32] of the angle product; lint lists the rest as unused.
//
// The formula and the split into compute units follow the reference design.
// The LANES-wide MAC, the fixed-point formats and the CORDIC are choices of
// this design.
module hdc_encoder_cu
  import hdc_pkg::*;
#(
  parameter int unsigned N_FEAT      = 784,   // features per input vector
  parameter int unsigned DIMS        = 80,    // hypervector dimensions of this unit
  parameter int unsigned LANES       = 16,    // multiply-accumulates per clock
  parameter int unsigned CORDIC_ITER = 20,
  localparam int unsigned NROWS = (N_FEAT + LANES - 1) / LANES,
  localparam int unsigned DIM_W = (DIMS  > 1) ? $clog2(DIMS)  : 1,
  localparam int unsigned ROW_W = (NROWS > 1) ? $clog2(NROWS) : 1,
  localparam int unsigned ADR_W = (DIMS*NROWS > 1) ? $clog2(DIMS*NROWS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // basis and phase write port
  input  logic                    bw_en,
  input  logic [DIM_W-1:0]        bw_dim,
  input  logic [ROW_W-1:0]        bw_row,
  input  word_t [LANES-1:0]       bw_data,
  input  logic                    bias_en,
  input  logic [DIM_W-1:0]        bias_dim,
  input  turns_t                  bias_data,
  // feature stream
  input  logic                    f_valid,
  output logic                    f_ready,
  input  word_t [LANES-1:0]       f_data,
  // encoded element stream
  output logic                    h_valid,
  input  logic                    h_ready,
  output word_t                   h_data,
  output logic                    h_last
);

  // ---------------- storage ----------------
  word_t [LANES-1:0] basis_mem [DIMS*NROWS];
  turns_t            bias_mem  [DIMS];
  word_t [LANES-1:0] fbuf      [NROWS];

  always_ff @(posedge clk) begin
    if (bw_en)   basis_mem[ADR_W'(bw_dim) * ADR_W'(NROWS) + ADR_W'(bw_row)] <= bw_data;
    if (bias_en) bias_mem[bias_dim] <= bias_data;
  end

  // ---------------- load / MAC issue ----------------
  typedef enum logic {S_LOAD, S_MAC} state_t;
  state_t state;

  logic [ROW_W-1:0] load_row, row_i;
  logic [DIM_W-1:0] dim_i;
  logic [ADR_W-1:0] raddr;

  // read stage registers
  word_t [LANES-1:0] rd_b, rd_f;
  logic              rd_valid, rd_last_row;
  logic [DIM_W-1:0]  rd_dim;

  // finished dot product, waiting for the trig stage
  acc_t              acc, dot;
  logic              dot_full;
  logic [DIM_W-1:0]  dot_dim;

  typedef enum logic [2:0] {T_IDLE, T_ANGLE, T_START, T_WAIT, T_OUT} tstate_t;
  tstate_t tstate;
  logic take_dot;
  assign take_dot = (tstate == T_IDLE) && dot_full;

  // A non-final row only updates the accumulator and may always issue. The
  // final row of a dimension issues only if the finished-dot register will
  // be free when it completes on the next clock.
  logic can_issue;
  assign f_ready   = (state == S_LOAD);
  assign can_issue = (state == S_MAC) &&
                     ((32'(row_i) != NROWS - 1) ||
                      ((!dot_full || take_dot) && !(rd_valid && rd_last_row)));

  always_ff @(posedge clk) begin
    if (state == S_LOAD && f_valid) fbuf[load_row] <= f_data;
    if (can_issue) begin
      rd_b <= basis_mem[raddr];
      rd_f <= fbuf[row_i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_LOAD;
      load_row    <= '0;
      row_i       <= '0;
      dim_i       <= '0;
      raddr       <= '0;
      rd_valid    <= 1'b0;
      rd_last_row <= 1'b0;
      rd_dim      <= '0;
    end else begin
      rd_valid <= can_issue;
      if (can_issue) begin
        rd_last_row <= (32'(row_i) == NROWS - 1);
        rd_dim      <= dim_i;
      end
      unique case (state)
        S_LOAD: if (f_valid) begin
          if (32'(load_row) == NROWS - 1) begin
            load_row <= '0;
            state    <= S_MAC;
          end else begin
            load_row <= load_row + 1'b1;
          end
        end
        S_MAC: if (can_issue) begin
          if (32'(row_i) == NROWS - 1) begin
            row_i <= '0;
            if (32'(dim_i) == DIMS - 1) begin
              dim_i <= '0;
              raddr <= '0;
              state <= S_LOAD;
            end else begin
              dim_i <= dim_i + 1'b1;
              raddr <= raddr + 1'b1;
            end
          end else begin
            row_i <= row_i + 1'b1;
            raddr <= raddr + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // ---------------- accumulate ----------------
  acc_t lane_sum;
  always_comb begin
    lane_sum = '0;
    for (int l = 0; l < LANES; l++) lane_sum += mul_q(rd_b[l], rd_f[l]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      dot      <= '0;
      dot_full <= 1'b0;
      dot_dim  <= '0;
    end else begin
      if (take_dot) dot_full <= 1'b0;
      if (rd_valid) begin
        if (rd_last_row) begin
          dot      <= acc + lane_sum;
          dot_dim  <= rd_dim;
          dot_full <= 1'b1;
          acc      <= '0;
        end else begin
          acc <= acc + lane_sum;
        end
      end
    end
  end

  // ---------------- trig stage ----------------
  acc_t             t_dot;
  logic [DIM_W-1:0] t_dim;
  turns_t           x_turns, bias_q;
  logic signed [96:0] angle_prod;
  logic             cs_start, c_busy, s_busy, c_done, s_done;
  logic signed [31:0] c_sin, c_cos, s_sin, s_cos;
  logic signed [63:0] h_prod;

  assign angle_prod = $signed(t_dot) * $signed({1'b0, INV_2PI_Q32});
  assign cs_start   = (tstate == T_START);
  assign h_prod     = c_cos * s_sin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate  <= T_IDLE;
      t_dot   <= '0;
      t_dim   <= '0;
      x_turns <= '0;
      bias_q  <= '0;
      h_valid <= 1'b0;
      h_data  <= '0;
      h_last  <= 1'b0;
    end else begin
      if (h_valid && h_ready) h_valid <= 1'b0;
      unique case (tstate)
        T_IDLE:  if (dot_full) begin
          t_dot  <= dot;
          t_dim  <= dot_dim;
          tstate <= T_ANGLE;
        end
        T_ANGLE: begin
          x_turns <= angle_prod[63:32];
          bias_q  <= bias_mem[t_dim];
          tstate  <= T_START;
        end
        T_START: tstate <= T_WAIT;
        T_WAIT:  if (c_done) tstate <= T_OUT;
        T_OUT:   if (!h_valid || h_ready) begin
          h_data  <= word_t'(h_prod >>> 44);
          h_last  <= (32'(t_dim) == DIMS - 1);
          h_valid <= 1'b1;
          tstate  <= T_IDLE;
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

  hdc_cordic #(.ITER(CORDIC_ITER)) u_cos (
    .clk, .rst_n, .start(cs_start), .angle(x_turns + bias_q),
    .busy(c_busy), .done(c_done), .sin_o(c_sin), .cos_o(c_cos)
  );
  hdc_cordic #(.ITER(CORDIC_ITER)) u_sin (
    .clk, .rst_n, .start(cs_start), .angle(x_turns),
    .busy(s_busy), .done(s_done), .sin_o(s_sin), .cos_o(s_cos)
  );

  // both CORDICs start together and take the same number of steps
  assert property (@(posedge clk) disable iff (!rst_n) c_done == s_done);

endmodule
