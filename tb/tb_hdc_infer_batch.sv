// tb_hdc_infer_batch: inference throughput on a batch of 128 images with
// the inference design at its default sizes (784 features, 2000 dimensions,
// 25 encoding units, 16 lanes, 10 classes).
//
// Ten random template vectors are encoded here in floating point and their
// encodings loaded as the class hypervectors; the batch cycles through the
// templates, so image i must be classified as class i mod 10. Features are
// streamed back to back and predictions taken as soon as they appear. The
// test checks every prediction and that the steady-state spacing of
// predictions stays within 4000 clocks (49 feature rows plus 80 dimensions
// of 49 clocks per unit, the next vector loading while the last finishes),
// and prints images per second at a 225 MHz clock.
`timescale 1ns/1ps
module tb_hdc_infer_batch;
  import hdc_pkg::*;
  localparam int N_FEAT = 784, D = 2000, NC = 10, LANES = 16, BATCH = 128;
  localparam int NROWS = N_FEAT / LANES;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bw_en, bias_en, cw_en, f_valid, f_ready, p_valid, p_ready;
  logic [10:0] bw_dim, bias_dim, cw_dim;
  logic [5:0]  bw_row;
  word_t [LANES-1:0] bw_data, f_data;
  turns_t bias_data;
  logic [3:0] cw_class, p_class;
  word_t cw_data;

  hdc_infer_kernel dut (.*);

  word_t  basis [D][N_FEAT];
  turns_t bias  [D];
  word_t  feat  [NC][N_FEAT];
  int checks = 0, failures = 0, cycle = 0, npred = 0;
  int t_pred [BATCH];
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_h(input int s, input int d);
    logic signed [127:0] acc, prod;
    logic [31:0] t;
    real x, b;
    acc = 0;
    for (int k = 0; k < N_FEAT; k++) acc += 128'(basis[d][k]) * 128'(feat[s][k]);
    prod = acc * 128'sd683565276;
    t = prod[63:32];
    x = real'(t) / 4294967296.0 * 2.0 * PI;
    b = real'(bias[d]) / 4294967296.0 * 2.0 * PI;
    return $cos(x + b) * $sin(x);
  endfunction

  always @(posedge clk) if (rst_n && p_valid && p_ready) begin
    checks++;
    if (int'(p_class) != npred % NC) begin
      failures++; $display("image %0d: class %0d expected %0d", npred, p_class, npred % NC);
    end
    t_pred[npred] = cycle;
    npred++;
  end

  initial begin
    int gap_max;
    {bw_en, bias_en, cw_en, f_valid} = '0;
    p_ready = 1;
    bw_dim = 0; bw_row = 0; bw_data = '0; bias_dim = 0; bias_data = 0;
    cw_class = 0; cw_dim = 0; cw_data = 0; f_data = '0;
    for (int d = 0; d < D; d++) begin
      for (int k = 0; k < N_FEAT; k++) basis[d][k] = $signed(32'($urandom % 131072)) - 65536;
      bias[d] = $urandom;
    end
    for (int s = 0; s < NC; s++) for (int k = 0; k < N_FEAT; k++) feat[s][k] = 32'($urandom % 65536);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < D; d++) begin
      for (int r = 0; r < NROWS; r++) begin
        @(negedge clk);
        bw_en = 1; bw_dim = 11'(d); bw_row = 6'(r);
        for (int l = 0; l < LANES; l++) bw_data[l] = basis[d][r*LANES+l];
      end
      @(negedge clk);
      bw_en = 0; bias_en = 1; bias_dim = 11'(d); bias_data = bias[d];
    end
    @(negedge clk) bias_en = 0;
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) begin
      cw_en = 1; cw_class = 4'(j); cw_dim = 11'(d); cw_data = word_t'($rtoi(ref_h(j, d) * 65536.0));
      @(negedge clk);
    end
    cw_en = 0;
    for (int s = 0; s < BATCH; s++)
      for (int r = 0; r < NROWS; r++) begin
        @(negedge clk);
        f_valid = 1;
        for (int l = 0; l < LANES; l++) f_data[l] = feat[s % NC][r*LANES+l];
        @(posedge clk);
        while (!f_ready) @(posedge clk);
      end
    @(negedge clk) f_valid = 0;
    wait (npred == BATCH);
    gap_max = 0;
    for (int i = 1; i < BATCH; i++) if (t_pred[i] - t_pred[i-1] > gap_max) gap_max = t_pred[i] - t_pred[i-1];
    checks++;
    if (gap_max > 4000) begin failures++; $display("prediction spacing up to %0d clocks", gap_max); end
    $display("batch of %0d: %0d clocks from first to last prediction, at most %0d between predictions",
             BATCH, t_pred[BATCH-1] - t_pred[0], gap_max);
    $display("throughput at 225 MHz: %0d images/s", int'(225.0e6 * real'(BATCH - 1) / real'(t_pred[BATCH-1] - t_pred[0])));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
