// tb_hdc_retrain_fit: runs the retraining rule against a model kept here.
// Classes are loaded through the write port, random labelled hypervectors
// are retrained (predict by dot product; on a miss add alpha*H to the true
// class and subtract it from the predicted one, alpha = 2425/65536), the
// miss and sample counters are compared, one dimension is zeroed through the
// regeneration port, and the classes are read back and compared exactly.
`timescale 1ns/1ps
module tb_hdc_retrain_fit;
  import hdc_pkg::*;
  localparam int D = 8, NC = 3, NS = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_clear, cmd_read, stats_clear, busy, cw_en, z_en, l_valid, l_ready, i_valid, i_ready;
  logic c_valid, c_ready, c_last;
  logic [$clog2(NC)-1:0] cw_class, l_label;
  logic [$clog2(D)-1:0] cw_dim, z_dim;
  word_t cw_data, i_data, c_data;
  logic [31:0] n_samples, n_miss;
  int checks = 0, failures = 0, misses = 0;
  longint ref_c [NC][D];
  longint hv [D];

  hdc_retrain_fit #(.D(D), .N_CLASS(NC)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  task automatic model_step(input int lab);
    longint s, bs, ah;
    int best;
    best = 0; bs = 0;
    for (int j = 0; j < NC; j++) begin
      s = 0;
      for (int d = 0; d < D; d++) s += hv[d] * ref_c[j][d];
      if (j == 0 || s > bs) begin bs = s; best = j; end
    end
    if (best != lab) begin
      misses++;
      for (int d = 0; d < D; d++) begin
        ah = (64'sd2425 * hv[d]) >>> 16;
        ref_c[lab][d]  = sat(ref_c[lab][d] + ah);
        ref_c[best][d] = sat(ref_c[best][d] - ah);
      end
    end
  endtask

  initial begin
    cmd_clear = 0; cmd_read = 0; stats_clear = 0; cw_en = 0; z_en = 0; l_valid = 0; i_valid = 0;
    cw_class = 0; l_label = 0; cw_dim = 0; z_dim = 0; cw_data = 0; i_data = 0; c_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait_idle();
    cmd_clear = 1; @(negedge clk) cmd_clear = 0;
    wait_idle();
    stats_clear = 1; @(negedge clk) stats_clear = 0;
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) begin
      ref_c[j][d] = longint'($signed(32'($urandom % 131072)) - 65536);
      cw_en = 1; cw_class = j[$clog2(NC)-1:0]; cw_dim = d[$clog2(D)-1:0]; cw_data = word_t'(ref_c[j][d]);
      @(negedge clk);
    end
    cw_en = 0;
    for (int s = 0; s < NS; s++) begin
      int lab;
      lab = $urandom % NC;
      for (int d = 0; d < D; d++) hv[d] = longint'($signed(32'($urandom % 131072)) - 65536);
      wait_idle();
      l_valid = 1; l_label = lab[$clog2(NC)-1:0];
      @(posedge clk);
      while (!l_ready) @(posedge clk);
      @(negedge clk) l_valid = 0;
      for (int d = 0; d < D; d++) begin
        i_valid = 1; i_data = word_t'(hv[d]);
        @(posedge clk);
        while (!i_ready) @(posedge clk);
        @(negedge clk);
      end
      i_valid = 0;
      model_step(lab);
    end
    wait_idle();
    checks++;
    if (n_samples != NS || n_miss != 32'(misses)) begin
      failures++; $display("counters %0d/%0d expected %0d/%0d", n_samples, n_miss, NS, misses);
    end
    checks++;
    if (misses == 0 || misses == NS) begin failures++; $display("no mix of hits and misses"); end
    // drop dimension 3
    z_en = 1; z_dim = 3; @(negedge clk) z_en = 0;
    for (int j = 0; j < NC; j++) ref_c[j][3] = 0;
    wait_idle();
    cmd_read = 1; @(negedge clk) cmd_read = 0;
    c_ready = 1;
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) begin
      @(posedge clk);
      while (!c_valid) @(posedge clk);
      checks++;
      if (longint'(c_data) != ref_c[j][d] || c_last != (j == NC-1 && d == D-1)) begin
        failures++; $display("class %0d dim %0d: %0d expected %0d", j, d, c_data, ref_c[j][d]);
      end
    end
    $display("misses %0d of %0d", misses, NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
