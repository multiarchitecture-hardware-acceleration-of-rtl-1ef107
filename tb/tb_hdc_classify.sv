// tb_hdc_classify: loads random class hypervectors, sends hypervectors with
// their elements in a shuffled dimension order and random gaps, and checks
// each prediction against an argmax of dot products computed here. One
// sample is a copy of a class (clear winner) and one case has all classes
// equal (tie, class 0 expected). Also checks the one-element-per-clock rate.
`timescale 1ns/1ps
module tb_hdc_classify;
  import hdc_pkg::*;
  localparam int D = 12, NC = 4, NS = 30;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic i_valid, i_ready, i_last, cw_en, p_valid, p_ready;
  word_t i_data, cw_data;
  logic [$clog2(D)-1:0] i_dim, cw_dim;
  logic [$clog2(NC)-1:0] cw_class, p_class;
  int checks = 0, failures = 0;
  word_t cls [NC][D];
  word_t hv [D];
  int order [D];

  hdc_classify #(.D(D), .N_CLASS(NC)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_class();
    longint s, best_s;
    int best;
    best = 0; best_s = 0;
    for (int j = 0; j < NC; j++) begin
      s = 0;
      for (int d = 0; d < D; d++) s += longint'(hv[d]) * longint'(cls[j][d]);
      if (j == 0 || s > best_s) begin best_s = s; best = j; end
    end
    return best;
  endfunction

  task automatic load_classes(input bit equal);
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) begin
      cls[j][d] = equal ? cls[0][d] : $signed(32'($urandom % 131072)) - 65536;
      @(negedge clk);
      cw_en = 1; cw_class = j[$clog2(NC)-1:0]; cw_dim = d[$clog2(D)-1:0]; cw_data = cls[j][d];
    end
    @(negedge clk) cw_en = 0;
  endtask

  task automatic send_hv(input bit gaps, output int cycles);
    int t0;
    for (int d = 0; d < D; d++) order[d] = d;
    order.shuffle();
    t0 = 0;
    for (int k = 0; k < D; k++) begin
      @(negedge clk);
      while (gaps && ($urandom % 3 == 0)) begin i_valid = 0; @(negedge clk); t0++; end
      i_valid = 1; i_dim = order[k][$clog2(D)-1:0]; i_data = hv[order[k]]; i_last = (k == D - 1);
      @(posedge clk);
      while (!i_ready) begin @(posedge clk); t0++; end
      t0++;
    end
    @(negedge clk) i_valid = 0;
    cycles = t0;
  endtask

  task automatic check_pred(input int expect_c);
    p_ready = 1;
    while (!p_valid) @(posedge clk);
    checks++;
    if (int'(p_class) != expect_c) begin failures++; $display("pred %0d expected %0d", p_class, expect_c); end
    @(negedge clk) p_ready = 0;
  endtask

  initial begin
    int cyc;
    i_valid = 0; i_last = 0; i_data = 0; i_dim = 0; cw_en = 0; cw_class = 0; cw_dim = 0; cw_data = 0; p_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_classes(0);
    for (int s = 0; s < NS; s++) begin
      for (int d = 0; d < D; d++) hv[d] = (s == 0) ? cls[2][d] : $signed(32'($urandom % 131072)) - 65536;
      send_hv(s != 1, cyc);
      if (s == 1) begin
        checks++;
        if (cyc != D) begin failures++; $display("took %0d clocks for %0d elements", cyc, D); end
      end
      check_pred(ref_class());
    end
    load_classes(1);
    for (int d = 0; d < D; d++) hv[d] = $signed(32'($urandom % 131072)) - 65536;
    send_hv(0, cyc);
    check_pred(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
