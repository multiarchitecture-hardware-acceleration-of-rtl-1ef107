// tb_hdc_bundle_fit: clears the classes, bundles labelled hypervectors whose
// elements arrive in shuffled order (each sample starting with the dimension
// the previous one ended on, so the write-back forwarding is exercised, and
// one class driven into saturation), reads all classes back and compares
// them with sums computed here. A second clear must zero everything.
`timescale 1ns/1ps
module tb_hdc_bundle_fit;
  import hdc_pkg::*;
  localparam int D = 12, NC = 3, NS = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_clear, cmd_read, busy, l_valid, l_ready, i_valid, i_ready, i_last, c_valid, c_ready, c_last;
  logic [$clog2(NC)-1:0] l_label;
  word_t i_data, c_data;
  logic [$clog2(D)-1:0] i_dim;
  int checks = 0, failures = 0;
  longint ref_c [NC][D];
  int order [D];
  int last_dim = 0;

  hdc_bundle_fit #(.D(D), .N_CLASS(NC)) dut (.*);

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

  task automatic command(input bit clr);
    @(negedge clk);
    while (busy) @(negedge clk);
    cmd_clear = clr; cmd_read = !clr;
    @(negedge clk);
    cmd_clear = 0; cmd_read = 0;
  endtask

  task automatic readback(input bit zero);
    command(0);
    c_ready = 1;
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) begin
      @(posedge clk);
      while (!c_valid) @(posedge clk);
      checks++;
      if (longint'(c_data) != (zero ? 0 : ref_c[j][d]) ||
          c_last != (j == NC - 1 && d == D - 1)) begin
        failures++; $display("class %0d dim %0d: %0d expected %0d", j, d, c_data, ref_c[j][d]);
      end
    end
    @(negedge clk) c_ready = 0;
  endtask

  initial begin
    cmd_clear = 0; cmd_read = 0; l_valid = 0; l_label = 0; i_valid = 0; i_data = 0; i_dim = 0; i_last = 0; c_ready = 0;
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) ref_c[j][d] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    command(1);
    for (int s = 0; s < NS; s++) begin
      int lab;
      lab = (s < 6) ? 2 : $urandom % NC;
      for (int d = 0; d < D; d++) order[d] = d;
      order.shuffle();
      for (int k = 0; k < D; k++) if (order[k] == last_dim) begin order[k] = order[0]; order[0] = last_dim; end
      @(negedge clk);
      l_valid = 1; l_label = lab[$clog2(NC)-1:0];
      @(posedge clk);
      while (!l_ready) @(posedge clk);
      @(negedge clk) l_valid = 0;
      for (int k = 0; k < D; k++) begin
        word_t v;
        v = (s < 6) ? 32'sd1000000000 : $signed(32'($urandom % 131072)) - 65536;
        if (k > 0) @(negedge clk);
        i_valid = 1; i_dim = order[k][$clog2(D)-1:0]; i_data = v; i_last = (k == D - 1);
        @(posedge clk);
        while (!i_ready) @(posedge clk);
        ref_c[lab][order[k]] = sat(ref_c[lab][order[k]] + longint'(v));
      end
      @(negedge clk) i_valid = 0;
      last_dim = order[D-1];
    end
    readback(0);
    command(1);
    readback(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
