// tb_hdc_pipe: pushes a numbered sequence through the FIFO with random
// stalls on both sides and checks order, completeness, that the pipe holds
// exactly DEPTH words when the reader stops, and one-clock fall-through.
`timescale 1ns/1ps
module tb_hdc_pipe;
  localparam int W = 16, DEPTH = 4, N = 500;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0, expect_v = 0, accepted;
  bit rand_ready = 1;

  hdc_pipe #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) out_ready <= rand_ready ? ($urandom % 3 != 0) : 1'b0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_data != W'(expect_v)) begin failures++; $display("got %0d expected %0d", out_data, expect_v); end
    expect_v++;
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill with the reader stopped: exactly DEPTH words fit
    rand_ready = 0;
    @(posedge clk);
    accepted = 0;
    for (int i = 0; i < DEPTH + 2; i++) begin
      @(negedge clk);
      in_valid = 1; in_data = W'(accepted);
      @(posedge clk);
      if (in_ready) accepted++;
    end
    @(negedge clk) in_valid = 0;
    checks++;
    if (accepted != DEPTH) begin failures++; $display("pipe took %0d words", accepted); end
    rand_ready = 1;
    for (int i = accepted; i < N; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4 != 0); in_data = W'(i);
      if (!in_valid) begin i--; continue; end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (expect_v != N) begin failures++; $display("received %0d of %0d", expect_v, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
