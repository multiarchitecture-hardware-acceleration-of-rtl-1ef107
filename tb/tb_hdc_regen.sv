// tb_hdc_regen: sends dimension indices and records every write the unit
// makes. For each index it expects NROWS basis rows for that dimension, in
// row order, then one phase write together with the class-zeroing strobe,
// all within NROWS+2 clocks of the index being offered. Basis words must lie
// in [-1, 1) and be spread over that range (mean near 0, both halves used),
// and successive phases must differ.
`timescale 1ns/1ps
module tb_hdc_regen;
  import hdc_pkg::*;
  localparam int D = 50, N_FEAT = 40, LANES = 4, NROWS = 10, NIDX = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic x_valid, x_ready, busy, bw_en, bias_en, z_en;
  logic [$clog2(D)-1:0] x_dim, bw_dim, bias_dim, z_dim;
  logic [$clog2(NROWS)-1:0] bw_row;
  word_t [LANES-1:0] bw_data;
  turns_t bias_data, last_bias;
  int checks = 0, failures = 0;
  int cur_dim, exp_row, n_words = 0, n_pos = 0, n_idx_done = 0;
  longint sum = 0;

  hdc_regen #(.D(D), .N_FEAT(N_FEAT), .LANES(LANES)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (bw_en) begin
      checks++;
      if (int'(bw_dim) != cur_dim || int'(bw_row) != exp_row) begin
        failures++; $display("basis write dim %0d row %0d, expected %0d/%0d", bw_dim, bw_row, cur_dim, exp_row);
      end
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (bw_data[l] < -32'sd65536 || bw_data[l] > 32'sd65535) begin failures++; $display("basis word out of range"); end
        sum += longint'(bw_data[l]);
        n_words++;
        if (bw_data[l] >= 0) n_pos++;
      end
      exp_row++;
    end
    if (bias_en || z_en) begin
      checks++;
      if (!(bias_en && z_en) || int'(bias_dim) != cur_dim || int'(z_dim) != cur_dim || exp_row != NROWS
          || bias_data == last_bias) begin
        failures++; $display("bias/zero write wrong for dim %0d", cur_dim);
      end
      last_bias = bias_data;
      n_idx_done++;
    end
  end

  initial begin
    x_valid = 0; x_dim = 0; last_bias = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NIDX; i++) begin
      int t;
      @(negedge clk);
      cur_dim = $urandom % D; exp_row = 0;
      x_valid = 1; x_dim = cur_dim[$clog2(D)-1:0];
      @(posedge clk);
      while (!x_ready) @(posedge clk);
      @(negedge clk) x_valid = 0;
      t = 1;
      while (n_idx_done != i + 1) begin @(negedge clk); t++; end
      checks++;
      if (t != NROWS + 2) begin failures++; $display("index took %0d clocks", t); end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (n_words != NIDX * NROWS * LANES) failures++;
    checks++;
    if (sum / n_words > 8000 || sum / n_words < -8000 || n_pos < n_words / 3 || n_pos > 2 * n_words / 3) begin
      failures++; $display("basis values not spread: mean %0d, %0d of %0d positive", sum / n_words, n_pos, n_words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
