// tb_hdc_neuralhd_round: NeuralHD training rounds with the NeuralHD design
// at its default sizes (784 features, 2000 dimensions, 16 lanes, 10
// classes).
//
// The test plays the host's part of NeuralHD on ten random training vectors,
// one per class:
//   1. encode all vectors and check each element against a floating-point
//      model of the encoder;
//   2. retrain epoch after epoch until an epoch has no misclassification,
//      mirroring the update rule in a bit-exact model, and check the
//      sample and miss counters of every epoch;
//   3. read the classes back, compute each dimension's variance across the
//      classes and drop the 200 dimensions with the lowest variance;
//   4. regenerate them, then check that every dropped dimension reads back
//      as zero in every class, that the new basis entries lie in [-1, 1),
//      and that re-encoding changes exactly the dropped dimensions and
//      matches the model with the new basis;
//   5. retrain again to a clean epoch.
// Cycle counts are checked: one encoding takes at most D*NROWS + 100
// clocks, regeneration NROWS+2 clocks per dimension, a fit sample at most
// 2D + 20 clocks of kernel time. The test prints the counts.
`timescale 1ns/1ps
module tb_hdc_neuralhd_round;
  import hdc_pkg::*;
  localparam int N_FEAT = 784, D = 2000, NC = 10, LANES = 16, NS = 10;
  localparam int NROWS = N_FEAT / LANES, N_DROP = 200, MAX_EPOCHS = 12;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bw_en, bias_en, f_valid, f_ready, e_valid, e_ready, e_last;
  logic cmd_clear, cmd_read, stats_clear, fit_busy, cw_en;
  logic l_valid, l_ready, h_valid, h_ready, c_valid, c_ready, c_last;
  logic x_valid, x_ready, regen_busy;
  logic [10:0] bw_dim, bias_dim, cw_dim, x_dim;
  logic [5:0]  bw_row;
  word_t [LANES-1:0] bw_data, f_data;
  turns_t bias_data;
  logic [3:0] cw_class, l_label;
  word_t e_data, cw_data, h_data, c_data;
  logic [31:0] n_samples, n_miss;

  hdc_neuralhd_kernel dut (.*);

  word_t  basis [D][N_FEAT];
  turns_t bias  [D];
  word_t  feat  [NS][N_FEAT];
  word_t  hv    [NS][D];
  longint mc    [NC][D];
  bit     dropped [D];
  int checks = 0, failures = 0, cycle = 0;
  int n_regen_rows = 0, n_zero = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && dut.r_bw_en) n_regen_rows++;
    if (rst_n && dut.z_en) n_zero++;
  end

  initial begin
    repeat (4000000) @(posedge clk);
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

  function automatic longint sat(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  task automatic encode(input int s, output word_t h [D], output int clocks);
    int got, t0;
    got = 0;
    t0 = cycle;
    fork
      begin
        for (int r = 0; r < NROWS; r++) begin
          @(negedge clk);
          f_valid = 1;
          for (int l = 0; l < LANES; l++) f_data[l] = feat[s][r*LANES+l];
          @(posedge clk);
          while (!f_ready) @(posedge clk);
        end
        @(negedge clk) f_valid = 0;
      end
      begin
        e_ready = 1;
        while (got < D) begin
          @(posedge clk);
          if (e_valid && e_ready) begin
            h[got] = e_data;
            checks++;
            if (e_last != (got == D - 1)) begin failures++; $display("e_last wrong at %0d", got); end
            got++;
          end
        end
        @(negedge clk) e_ready = 0;
      end
    join
    clocks = cycle - t0;
  endtask

  // one sample through the fit kernel and the model; returns kernel clocks
  task automatic fit_sample(input int s, output int clocks);
    longint sc, bs, ah;
    int best, t0;
    @(negedge clk);
    while (fit_busy) @(negedge clk);
    t0 = cycle;
    l_valid = 1; l_label = 4'(s);
    @(posedge clk);
    while (!l_ready) @(posedge clk);
    @(negedge clk) l_valid = 0;
    for (int d = 0; d < D; d++) begin
      h_valid = 1; h_data = hv[s][d];
      @(posedge clk);
      while (!h_ready) @(posedge clk);
      @(negedge clk);
    end
    h_valid = 0;
    while (fit_busy) @(negedge clk);
    clocks = cycle - t0;
    best = 0; bs = 0;
    for (int j = 0; j < NC; j++) begin
      sc = 0;
      for (int d = 0; d < D; d++) sc += longint'(hv[s][d]) * mc[j][d];
      if (j == 0 || sc > bs) begin bs = sc; best = j; end
    end
    if (best != s)
      for (int d = 0; d < D; d++) begin
        ah = (64'sd2425 * longint'(hv[s][d])) >>> 16;
        mc[s][d]    = sat(mc[s][d] + ah);
        mc[best][d] = sat(mc[best][d] - ah);
      end
  endtask

  task automatic readback();
    @(negedge clk);
    while (fit_busy) @(negedge clk);
    cmd_read = 1;
    @(negedge clk) cmd_read = 0;
    c_ready = 1;
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) begin
      @(posedge clk);
      while (!c_valid) @(posedge clk);
      checks++;
      if (longint'(c_data) != mc[j][d]) begin
        failures++;
        if (failures < 10) $display("class %0d dim %0d: %0d expected %0d", j, d, c_data, mc[j][d]);
      end
    end
    @(negedge clk) c_ready = 0;
  endtask

  // retrain until an epoch has no miss; returns the number of epochs
  task automatic retrain(output int epochs);
    int clk_max, c;
    epochs = 0;
    clk_max = 0;
    do begin
      @(negedge clk);
      while (fit_busy) @(negedge clk);
      stats_clear = 1;
      @(negedge clk) stats_clear = 0;
      for (int s = 0; s < NS; s++) begin
        fit_sample(s, c);
        if (c > clk_max) clk_max = c;
      end
      @(negedge clk);
      while (fit_busy) @(negedge clk);
      epochs++;
      $display("epoch %0d: %0d samples, %0d misses", epochs, n_samples, n_miss);
      checks++;
      if (n_samples != 32'(NS)) begin failures++; $display("sample counter %0d", n_samples); end
    end while (n_miss != 0 && epochs < MAX_EPOCHS);
    checks++;
    if (n_miss != 0) begin failures++; $display("no clean epoch after %0d epochs", epochs); end
    checks++;
    if (clk_max > 2 * D + 20) begin failures++; $display("fit sample took %0d clocks", clk_max); end
    $display("longest fit sample: %0d clocks", clk_max);
  endtask

  initial begin
    int c, ep, enc_max, t0;
    real var_d [D];
    word_t h2 [D];
    {bw_en, bias_en, f_valid, e_ready, cmd_clear, cmd_read, stats_clear} = '0;
    {cw_en, l_valid, h_valid, c_ready, x_valid} = '0;
    bw_dim = 0; bw_row = 0; bw_data = '0; bias_dim = 0; bias_data = 0;
    f_data = '0; cw_class = 0; cw_dim = 0; cw_data = 0; l_label = 0;
    h_data = 0; x_dim = 0;
    for (int d = 0; d < D; d++) begin
      for (int k = 0; k < N_FEAT; k++) basis[d][k] = $signed(32'($urandom % 131072)) - 65536;
      bias[d] = $urandom;
      dropped[d] = 0;
    end
    for (int s = 0; s < NS; s++) for (int k = 0; k < N_FEAT; k++) feat[s][k] = 32'($urandom % 65536);
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) mc[j][d] = 0;
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

    // 1. encode
    enc_max = 0;
    for (int s = 0; s < NS; s++) begin
      encode(s, hv[s], c);
      if (c > enc_max) enc_max = c;
      for (int d = 0; d < D; d++) begin
        checks++;
        if (!close(hv[s][d], ref_h(s, d), 0.0005)) begin
          failures++;
          if (failures < 10) $display("encode %0d dim %0d: %f expected %f", s, d, real'(hv[s][d]) / 65536.0, ref_h(s, d));
        end
      end
    end
    checks++;
    if (enc_max > D * NROWS + 100) begin failures++; $display("encoding took %0d clocks", enc_max); end
    $display("encoding: %0d clocks per vector", enc_max);

    // 2. retrain
    retrain(ep);
    $display("round 1 converged after %0d epochs", ep);

    // 3. read back, rank by variance, drop the lowest
    readback();
    for (int d = 0; d < D; d++) begin
      real m, v;
      m = 0.0; v = 0.0;
      for (int j = 0; j < NC; j++) m += real'(mc[j][d]);
      m /= NC;
      for (int j = 0; j < NC; j++) v += (real'(mc[j][d]) - m) * (real'(mc[j][d]) - m);
      var_d[d] = v / NC;
    end
    for (int n = 0; n < N_DROP; n++) begin
      int lo;
      lo = -1;
      for (int d = 0; d < D; d++)
        if (!dropped[d] && (lo < 0 || var_d[d] < var_d[lo])) lo = d;
      dropped[lo] = 1;
    end

    // 4. regenerate
    t0 = cycle;
    for (int d = 0; d < D; d++) if (dropped[d]) begin
      @(negedge clk);
      x_valid = 1; x_dim = 11'(d);
      @(posedge clk);
      while (!x_ready) @(posedge clk);
    end
    @(negedge clk) x_valid = 0;
    while (regen_busy) @(negedge clk);
    $display("regeneration of %0d dimensions: %0d clocks", N_DROP, cycle - t0);
    checks++;
    if (cycle - t0 > N_DROP * (NROWS + 2) + 10) begin failures++; $display("regeneration too slow"); end
    checks++;
    if (n_regen_rows != N_DROP * NROWS || n_zero != N_DROP) begin
      failures++; $display("regeneration wrote %0d rows, zeroed %0d dimensions", n_regen_rows, n_zero);
    end
    for (int d = 0; d < D; d++) if (dropped[d]) begin
      for (int j = 0; j < NC; j++) mc[j][d] = 0;
      for (int r = 0; r < NROWS; r++) for (int l = 0; l < LANES; l++)
        basis[d][r*LANES+l] = dut.u_enc.basis_mem[d*NROWS + r][l];
      bias[d] = dut.u_enc.bias_mem[d];
      for (int k = 0; k < N_FEAT; k++) begin
        checks++;
        if (basis[d][k] < -32'sd65536 || basis[d][k] >= 32'sd65536) begin
          failures++; $display("new basis entry %0d,%0d out of range: %0d", d, k, basis[d][k]);
        end
      end
    end
    readback();
    for (int s = 0; s < NS; s++) begin
      encode(s, h2, c);
      for (int d = 0; d < D; d++) begin
        checks++;
        if (!dropped[d] && h2[d] != hv[s][d]) begin
          failures++; $display("kept dim %0d of vector %0d changed", d, s);
        end
        if (dropped[d] && !close(h2[d], ref_h(s, d), 0.0005)) begin
          failures++; $display("regenerated dim %0d of vector %0d: %f expected %f", d, s, real'(h2[d]) / 65536.0, ref_h(s, d));
        end
        hv[s][d] = h2[d];
      end
    end

    // 5. retrain again
    retrain(ep);
    $display("round 2 converged after %0d epochs", ep);
    readback();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
