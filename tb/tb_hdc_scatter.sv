// tb_hdc_scatter: feeds a numbered sequence of rows into the broadcast
// while each output is stalled at random, and checks that every unit
// receives every row exactly once and in order.
`timescale 1ns/1ps
module tb_hdc_scatter;
  import hdc_pkg::*;
  localparam int NUM_CU = 5, LANES = 2, NROW = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_valid, s_ready;
  word_t [LANES-1:0] s_data, m_data;
  logic [NUM_CU-1:0] m_valid, m_ready;
  int checks = 0, failures = 0;
  int got [NUM_CU];
  int sent = 0;

  hdc_scatter #(.NUM_CU(NUM_CU), .LANES(LANES)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) m_ready <= NUM_CU'($urandom);

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NUM_CU; c++) if (m_valid[c] && m_ready[c]) begin
      checks++;
      if (m_data[0] != got[c] || m_data[1] != ~got[c]) begin
        failures++; $display("unit %0d got row %0d expected %0d", c, m_data[0], got[c]);
      end
      got[c]++;
    end
    if (s_valid && s_ready) sent++;
  end

  initial begin
    for (int c = 0; c < NUM_CU; c++) got[c] = 0;
    s_valid = 0; s_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NROW; r++) begin
      @(negedge clk);
      s_valid = 1; s_data[0] = r; s_data[1] = ~r;
      @(posedge clk);
      while (!s_ready) @(posedge clk);
    end
    @(negedge clk) s_valid = 0;
    repeat (5) @(posedge clk);
    for (int c = 0; c < NUM_CU; c++) begin
      checks++;
      if (got[c] != NROW) begin failures++; $display("unit %0d got %0d rows", c, got[c]); end
    end
    checks++;
    if (sent != NROW) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
