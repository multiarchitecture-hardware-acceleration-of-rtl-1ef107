// hdc_bundle_fit: fitting kernel of the single-pass training design.
//
// Single-pass training bundles every encoded training hypervector into the
// class hypervector of its label: C_label += H, element by element. This
// kernel keeps the N_CLASS class hypervectors in on-chip memory (one row per
// dimension, all classes side by side), reads the label of each sample from
// the l_* stream and then adds the sample's elements, which arrive from the
// gather in any dimension order, into that class.
//
// How it works. An accepted element reads its memory row (one clock) and the
// next clock writes the row back with the label's entry increased by the
// element (saturating Q15.16 add). If the element just written and the one
// being read share a row, the written value is forwarded. Commands, taken
// only between samples: cmd_clear zeroes the memory (D clocks); cmd_read
// streams all class hypervectors out, class by class in dimension order
// (two clocks per word), for the host to normalise.
//
// Interface: l_* label stream, i_* element stream with dimension and last
// flag, c_* class readout stream, busy. The bundling rule and reading the
// classes back to the host follow the reference design; saturation, the
// command interface and timing are this design's choices.
module hdc_bundle_fit
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
  output logic               busy,
  input  logic               l_valid,
  output logic               l_ready,
  input  logic [L_W-1:0]     l_label,
  input  logic               i_valid,
  output logic               i_ready,
  input  word_t              i_data,
  input  logic [D_W-1:0]     i_dim,
  input  logic               i_last,
  output logic               c_valid,
  input  logic               c_ready,
  output word_t              c_data,
  output logic               c_last
);

  word_t [N_CLASS-1:0] cmem [D];

  typedef enum logic [2:0] {S_RUN, S_CLEAR, S_RD_FETCH, S_RD_SEND} state_t;
  state_t state;

  logic                have_label;
  logic [L_W-1:0]      label;
  logic                take;
  // read-modify-write pipeline
  logic                wb_valid;
  logic [D_W-1:0]      wb_dim;
  word_t [N_CLASS-1:0] rd_row, fwd_row;
  logic [L_W-1:0]      wb_label;
  word_t               wb_h;
  logic [D_W-1:0]      ptr_d;
  logic [L_W-1:0]      ptr_c;

  assign l_ready = (state == S_RUN) && !have_label;
  assign i_ready = (state == S_RUN) && have_label;
  assign take    = i_valid && i_ready;
  assign busy    = (state != S_RUN) || have_label || wb_valid;

  // row being written back this clock
  always_comb begin
    fwd_row = rd_row;
    fwd_row[wb_label] = sat_add(rd_row[wb_label], wb_h);
  end

  always_ff @(posedge clk) begin
    if (state == S_CLEAR)
      cmem[ptr_d] <= '0;
    else if (wb_valid)
      cmem[wb_dim] <= fwd_row;
    if (take)
      rd_row <= (wb_valid && wb_dim == i_dim) ? fwd_row : cmem[i_dim];
    else if (state == S_RD_FETCH)
      rd_row <= cmem[ptr_d];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RUN;
      have_label <= 1'b0;
      label      <= '0;
      wb_valid   <= 1'b0;
      wb_dim     <= '0;
      wb_label   <= '0;
      wb_h       <= '0;
      ptr_d      <= '0;
      ptr_c      <= '0;
      c_valid    <= 1'b0;
      c_data     <= '0;
      c_last     <= 1'b0;
    end else begin
      wb_valid <= take;
      if (take) begin
        wb_dim   <= i_dim;
        wb_label <= label;
        wb_h     <= i_data;
        if (i_last) have_label <= 1'b0;
      end
      if (l_valid && l_ready) begin
        label      <= l_label;
        have_label <= 1'b1;
      end
      unique case (state)
        S_RUN: if (!have_label && !wb_valid && !(l_valid && l_ready)) begin
          if (cmd_clear) begin
            ptr_d <= '0;
            state <= S_CLEAR;
          end else if (cmd_read) begin
            ptr_d <= '0;
            ptr_c <= '0;
            state <= S_RD_FETCH;
          end
        end
        S_CLEAR: begin
          if (32'(ptr_d) == D - 1) state <= S_RUN;
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
                state <= S_RUN;
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
        default: state <= S_RUN;
      endcase
    end
  end

endmodule
