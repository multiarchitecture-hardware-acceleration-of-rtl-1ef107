// tb_hdc_gather: each of NUM_CU producers emits its DPC elements (value
// encodes hypervector number and global dimension) at random times for
// several hypervectors, some running ahead; the checker requires every
// element to carry the dimension it encodes, every dimension to appear once
// per hypervector, hypervectors not to interleave, and o_last on the last.
`timescale 1ns/1ps
module tb_hdc_gather;
  import hdc_pkg::*;
  localparam int NUM_CU = 4, DPC = 6, D = NUM_CU * DPC, NHV = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NUM_CU-1:0] i_valid, i_ready;
  word_t [NUM_CU-1:0] i_data;
  logic o_valid, o_ready, o_last;
  word_t o_data;
  logic [$clog2(D)-1:0] o_dim;
  int checks = 0, failures = 0;
  int pos [NUM_CU];     // next element index of each producer (hv*DPC + k)
  int hv_out = 0, n_in_hv = 0;
  bit seen [D];

  hdc_gather #(.NUM_CU(NUM_CU), .DPC(DPC)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producers: hold valid until taken
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NUM_CU; c++) begin
      if (i_valid[c] && i_ready[c]) begin
        pos[c]++;
        i_valid[c] <= 0;
      end else if (!i_valid[c] && pos[c] < NHV * DPC && ($urandom % 3 == 0)) begin
        i_valid[c] <= 1;
        i_data[c]  <= (pos[c] / DPC) * 1000 + c * DPC + (pos[c] % DPC);
      end
    end
  end

  always @(posedge clk) o_ready <= ($urandom % 4 != 0);

  always @(posedge clk) if (rst_n && o_valid && o_ready) begin
    checks++;
    if (o_data != hv_out * 1000 + int'(o_dim) || seen[o_dim]) begin
      failures++; $display("element %0d at dim %0d in hv %0d", o_data, o_dim, hv_out);
    end
    seen[o_dim] = 1;
    n_in_hv++;
    checks++;
    if (o_last != (n_in_hv == D)) begin failures++; $display("o_last wrong"); end
    if (n_in_hv == D) begin
      n_in_hv = 0; hv_out++;
      for (int d = 0; d < D; d++) seen[d] = 0;
    end
  end

  initial begin
    for (int c = 0; c < NUM_CU; c++) pos[c] = 0;
    for (int d = 0; d < D; d++) seen[d] = 0;
    i_valid = '0; i_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (hv_out == NHV);
    repeat (5) @(posedge clk);
    checks++;
    if (o_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
