// hdc_retrain_fit: fitting kernel of the NeuralHD training design.
//
// Retraining refines the class hypervectors one labelled sample at a time.
// For an encoded hypervector H of class l the kernel predicts
// l' = argmax_j H . C_j; if l' differs from l it applies
//     C_l  = C_l  + alpha * H
//     C_l' = C_l' - alpha * H
// with alpha = 0.037, and otherwise leaves the classes alone.
//
// How it works. The sample's elements arrive in dimension order after its
// label. Each element is stored in a hypervector buffer and, one clock after
// its class row is read, multiplied into all N_CLASS score accumulators, so
// the scores are ready one clock after the last element. A miss then costs
// one update pass of D clocks: each clock reads one class row and the stored
// element, and the next clock writes the row back with both entries changed
// (saturating Q15.16 adds). Consecutive rows differ, so the pass needs no
// forwarding. The kernel counts samples and misses so the host can tell
// when the training set is classified without error.
//
// Other ports, all taken only between samples: cmd_clear zeroes the classes;
// cw_* writes one class element (host load); z_en/z_dim zeroes one
// dimension in every class (dimension regeneration); cmd_read streams the
// classes out class by class (two clocks per word); stats_clear zeroes the
// counters. The update rule, alpha and the zeroing of dropped dimensions
// follow the reference design. Using the plain dot product as similarity
// during retraining, the fixed point and the command interface are this
// design's choices.
module hdc_retrain_fit
  import hdc_pkg::*;
#(
  parameter int unsigned D       = 2000,
  parameter int unsigned N_CLASS = 10,
  localparam int unsigned D_W    = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned L_W    = (N_CLASS > 1) ? $clog2(N_CLASS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_clear,
  input  logic               cmd_read,
  input  logic               stats_clear,
  output logic               busy,
  input  logic               cw_en,
  input  logic [L_W-1:0]     cw_class,
  input  logic [D_W-1:0]     cw_dim,
  input  word_t              cw_data,
  input  logic               z_en,
  input  logic [D_W-1:0]     z_dim,
  input  logic               l_valid,
  output logic               l_ready,
  input  logic [L_W-1:0]     l_label,
  input  logic               i_valid,
  output logic               i_ready,
  input  word_t              i_data,
  output logic               c_valid,
  input  logic               c_ready,
  output word_t              c_data,
  output logic               c_last,
  output logic [31:0]        n_samples,
  output logic [31:0]        n_miss
);

  word_t [N_CLASS-1:0] cmem [D];
  word_t               hbuf [D];

  typedef enum logic [2:0] {S_IDLE, S_ACC, S_DECIDE, S_UPD, S_CLEAR, S_RD_FETCH, S_RD_SEND} state_t;
  state_t state;

  logic [L_W-1:0]      label, pred;
  logic [D_W-1:0]      ptr_d;
  logic [L_W-1:0]      ptr_c;
  logic                take;
  logic                rd_valid;       // accumulate stage
  word_t               rd_h;
  word_t [N_CLASS-1:0] rd_row;
  logic                up_valid;       // update write-back stage
  logic [D_W-1:0]      up_dim;
  word_t               up_h;
  word_t [N_CLASS-1:0] up_row;
  acc_t                score [N_CLASS];

  assign l_ready = (state == S_IDLE) && !cmd_clear && !cmd_read;
  assign i_ready = (state == S_ACC);
  assign take    = i_valid && i_ready;
  assign busy    = (state != S_IDLE) || up_valid;

  logic [L_W-1:0] best;
  always_comb begin
    best = '0;
    for (int j = 1; j < N_CLASS; j++)
      if (score[j] > score[best]) best = L_W'(j);
  end

  // row after the retraining update
  word_t [N_CLASS-1:0] new_row;
  word_t               ah;
  always_comb begin
    ah      = alpha_scale(up_h);
    new_row = up_row;
    new_row[label] = sat_add(up_row[label], ah);
    new_row[pred]  = sat_add(up_row[pred], -ah);
  end

  // memories
  always_ff @(posedge clk) begin
    if (state == S_CLEAR)                       cmem[ptr_d] <= '0;
    else if (up_valid)                          cmem[up_dim] <= new_row;
    else if (z_en && state == S_IDLE)           cmem[z_dim] <= '0;
    else if (cw_en && state == S_IDLE)          cmem[cw_dim][cw_class] <= cw_data;
    if (take) begin
      hbuf[ptr_d] <= i_data;
      rd_row      <= cmem[ptr_d];
    end else if (state == S_UPD) begin
      up_row <= cmem[ptr_d];
      up_h   <= hbuf[ptr_d];
    end else if (state == S_RD_FETCH) begin
      rd_row <= cmem[ptr_d];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      label     <= '0;
      pred      <= '0;
      ptr_d     <= '0;
      ptr_c     <= '0;
      rd_valid  <= 1'b0;
      rd_h      <= '0;
      up_valid  <= 1'b0;
      up_dim    <= '0;
      c_valid   <= 1'b0;
      c_data    <= '0;
      c_last    <= 1'b0;
      n_samples <= '0;
      n_miss    <= '0;
      for (int j = 0; j < N_CLASS; j++) score[j] <= '0;
    end else begin
      rd_valid <= take;
      if (take) rd_h <= i_data;
      if (rd_valid)
        for (int j = 0; j < N_CLASS; j++) score[j] <= score[j] + mul_q(rd_h, rd_row[j]);
      up_valid <= (state == S_UPD);
      if (state == S_UPD) up_dim <= ptr_d;
      if (stats_clear) begin
        n_samples <= '0;
        n_miss    <= '0;
      end
      unique case (state)
        S_IDLE: begin
          ptr_d <= '0;
          if (cmd_clear)       state <= S_CLEAR;
          else if (cmd_read)   state <= S_RD_FETCH;
          else if (l_valid) begin
            label <= l_label;
            for (int j = 0; j < N_CLASS; j++) score[j] <= '0;
            state <= S_ACC;
          end
        end
        S_ACC: if (take) begin
          if (32'(ptr_d) == D - 1) begin
            ptr_d <= '0;
            state <= S_DECIDE;
          end else begin
            ptr_d <= ptr_d + 1'b1;
          end
        end
        S_DECIDE: if (!rd_valid) begin
          pred      <= best;
          n_samples <= n_samples + 1;
          if (best != label) begin
            n_miss <= n_miss + 1;
            state  <= S_UPD;
          end else begin
            state  <= S_IDLE;
          end
        end
        S_UPD: begin
          if (32'(ptr_d) == D - 1) begin
            ptr_d <= '0;
            state <= S_IDLE;
          end else begin
            ptr_d <= ptr_d + 1'b1;
          end
        end
        S_CLEAR: begin
          if (32'(ptr_d) == D - 1) state <= S_IDLE;
          ptr_d <= (32'(ptr_d) == D - 1) ? '0 : ptr_d + 1'b1;
        end
        S_RD_FETCH: state <= S_RD_SEND;
        S_RD_SEND: begin
          if (!c_valid) begin
            c_valid <= 1'b1;
            c_data  <= rd_row[ptr_c];
            c_last  <= (32'(ptr_c) == N_CLASS - 1) && (32'(ptr_d) == D - 1);
          end else if (c_ready) begin
            c_valid <= 1'b0;
            if (32'(ptr_d) == D - 1) begin
              ptr_d <= '0;
              if (32'(ptr_c) == N_CLASS - 1) begin
                ptr_c <= '0;
                state <= S_IDLE;
              end else begin
                ptr_c <= ptr_c + 1'b1;
                state <= S_RD_FETCH;
              end
            end else begin
              ptr_d <= ptr_d + 1'b1;
              state <= S_RD_FETCH;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
