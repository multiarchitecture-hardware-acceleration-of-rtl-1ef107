// tb_hdc_fpga_top_full: the end-to-end test of tb_hdc_fpga_top_body.svh
// with the design at its default sizes: 784 features, 16 lanes, 2000
// dimensions, 10 classes, 25 inference units and 8 training units. Checks
// the inference latency: 49 clocks of feature load plus 80 dimensions of 49
// clocks each, plus the trig, gather and classifier tail.
`timescale 1ns/1ps
module tb_hdc_fpga_top_full;
  import hdc_pkg::*;
  localparam int N_FEAT = 784, D = 2000, NC = 10, LANES = 16, INF_CU = 25, SPT_CU = 8, ITER = 20;
  localparam int NS_INF = 3, NS_TR = 3, EPOCHS = 1, HOLD = 9000;
  localparam int INF_LAT_MAX = 49 + 80 * 49 + 150;
  localparam int WATCHDOG = 3000000;

`include "tb_hdc_fpga_top_body.svh"

  hdc_fpga_top dut (.*);
endmodule
