// tb_hdc_cordic: checks sine and cosine against the simulator's real-valued
// functions for the four quadrant boundaries and random angles, and checks
// that `done` is high ITER+1 clocks after the clock in which `start` is high.
`timescale 1ns/1ps
module tb_hdc_cordic;
  localparam int ITER = 20;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [31:0] angle;
  logic signed [31:0] sin_o, cos_o;
  int checks = 0, failures = 0;

  hdc_cordic #(.ITER(ITER)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] a);
    int n;
    real th, es, ec, gs, gc;
    @(negedge clk);
    start = 1; angle = a;
    @(negedge clk);
    start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    checks++;
    if (n != ITER + 1) begin failures++; $display("latency %0d, expected %0d", n, ITER + 1); end
    th = real'(a) / 4294967296.0 * 2.0 * PI;
    es = $sin(th); ec = $cos(th);
    gs = real'(sin_o) / 1073741824.0; gc = real'(cos_o) / 1073741824.0;
    checks++;
    if ((gs - es > 1e-5) || (es - gs > 1e-5) || (gc - ec > 1e-5) || (ec - gc > 1e-5)) begin
      failures++;
      $display("angle %h: sin %f/%f cos %f/%f", a, gs, es, gc, ec);
    end
  endtask

  initial begin
    start = 0; angle = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32'h0000_0000); run(32'h4000_0000); run(32'h8000_0000); run(32'hC000_0000);
    run(32'h3FFF_FFFF); run(32'h7FFF_FFFF); run(32'hBFFF_FFFF); run(32'hFFFF_FFFF);
    run(32'h2000_0000); run(32'h6000_0000); run(32'hA000_0000); run(32'hE000_0000);
    for (int i = 0; i < 300; i++) run($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
