// tb_hdc_train_batch: single-pass training throughput with the training
// design at its default sizes (784 features, 2000 dimensions, 8 encoding
// units of 250 dimensions, 16 lanes, 10 classes).
//
// A batch of 24 random feature vectors with random labels is streamed in
// back to back after the class memory is cleared. The test encodes each
// vector here in floating point, sums the encodings per label, reads the
// class hypervectors back and checks every element against those sums. It
// also times the end of each bundled hypervector and checks that the
// steady-state spacing stays within 12,400 clocks (49 feature rows plus 250
// dimensions of 49 clocks per unit), then prints the time one pass over
// 60,000 training images would take at a 263 MHz clock.
`timescale 1ns/1ps
module tb_hdc_train_batch;
  import hdc_pkg::*;
  localparam int N_FEAT = 784, D = 2000, NC = 10, LANES = 16, BATCH = 24;
  localparam int NROWS = N_FEAT / LANES;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bw_en, bias_en, f_valid, f_ready, l_valid, l_ready;
  logic cmd_clear, cmd_read, busy, c_valid, c_ready, c_last;
  logic [10:0] bw_dim, bias_dim;
  logic [5:0]  bw_row;
  word_t [LANES-1:0] bw_data, f_data;
  turns_t bias_data;
  logic [3:0] l_label;
  word_t c_data;

  hdc_train_kernel dut (.*);

  word_t  basis [D][N_FEAT];
  turns_t bias  [D];
  word_t  feat  [BATCH][N_FEAT];
  int     label [BATCH];
  real    sum   [NC][D];
  int     cnt   [NC];
  int checks = 0, failures = 0, cycle = 0, ndone = 0;
  int t_done [BATCH];
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (1000000) @(posedge clk);
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

  function automatic bit close(input word_t got, input real expect_v, input real tol);
    real g;
    g = real'(got) / 65536.0;
    return (g - expect_v <= tol) && (expect_v - g <= tol);
  endfunction

  // a hypervector is finished when its last element reaches the fit kernel
  always @(posedge clk) if (rst_n && dut.g_valid && dut.g_ready && dut.g_last) begin
    t_done[ndone] = cycle;
    ndone++;
  end

  initial begin
    int gap_max;
    {bw_en, bias_en, f_valid, l_valid, cmd_clear, cmd_read, c_ready} = '0;
    bw_dim = 0; bw_row = 0; bw_data = '0; bias_dim = 0; bias_data = 0;
    f_data = '0; l_label = 0;
    for (int d = 0; d < D; d++) begin
      for (int k = 0; k < N_FEAT; k++) basis[d][k] = $signed(32'($urandom % 131072)) - 65536;
      bias[d] = $urandom;
    end
    for (int j = 0; j < NC; j++) begin
      cnt[j] = 0;
      for (int d = 0; d < D; d++) sum[j][d] = 0.0;
    end
    for (int s = 0; s < BATCH; s++) begin
      for (int k = 0; k < N_FEAT; k++) feat[s][k] = 32'($urandom % 65536);
      label[s] = $urandom % NC;
    end
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
    cmd_clear = 1;
    @(negedge clk) cmd_clear = 0;
    @(negedge clk);
    while (busy) @(negedge clk);
    fork
      for (int s = 0; s < BATCH; s++) begin
        @(negedge clk);
        l_valid = 1; l_label = 4'(label[s]);
        @(posedge clk);
        while (!l_ready) @(posedge clk);
        @(negedge clk) l_valid = 0;
      end
      for (int s = 0; s < BATCH; s++)
        for (int r = 0; r < NROWS; r++) begin
          @(negedge clk);
          f_valid = 1;
          for (int l = 0; l < LANES; l++) f_data[l] = feat[s][r*LANES+l];
          @(posedge clk);
          while (!f_ready) @(posedge clk);
        end
      // the reference sums are built while the design runs
      for (int s = 0; s < BATCH; s++) begin
        cnt[label[s]]++;
        for (int d = 0; d < D; d++) sum[label[s]][d] += ref_h(s, d);
      end
    join
    @(negedge clk) f_valid = 0;
    wait (ndone == BATCH);
    @(negedge clk);
    while (busy) @(negedge clk);
    cmd_read = 1;
    @(negedge clk) cmd_read = 0;
    c_ready = 1;
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) begin
      @(posedge clk);
      while (!c_valid) @(posedge clk);
      checks++;
      if (!close(c_data, sum[j][d], 0.0005 * (cnt[j] + 1))) begin
        failures++;
        if (failures < 10)
          $display("class %0d dim %0d: %f expected %f", j, d, real'(c_data) / 65536.0, sum[j][d]);
      end
      if (c_last != (j == NC - 1 && d == D - 1)) begin
        failures++; $display("c_last wrong at class %0d dim %0d", j, d);
      end
    end
    @(negedge clk) c_ready = 0;
    gap_max = 0;
    for (int i = 1; i < BATCH; i++) if (t_done[i] - t_done[i-1] > gap_max) gap_max = t_done[i] - t_done[i-1];
    checks++;
    if (gap_max > 12400) begin failures++; $display("hypervector spacing up to %0d clocks", gap_max); end
    $display("batch of %0d: at most %0d clocks between bundled hypervectors", BATCH, gap_max);
    $display("one pass over 60000 images at 263 MHz: %0d ms",
             int'(60000.0 * real'(gap_max) / 263.0e3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
