// tb_hdc_fpga_top: end-to-end test of all three designs at reduced sizes
// (32 features, 4 lanes, 24 dimensions, 4 inference and 2 training units,
// 3 classes). The test sequence is described in tb_hdc_fpga_top_body.svh.
`timescale 1ns/1ps
module tb_hdc_fpga_top;
  import hdc_pkg::*;
  localparam int N_FEAT = 32, D = 24, NC = 3, LANES = 4, INF_CU = 4, SPT_CU = 2, ITER = 20;
  localparam int NS_INF = 9, NS_TR = 7, EPOCHS = 4, HOLD = 400;
  // compute units are trig-bound here: one element per ~ITER+6 clocks
  localparam int INF_LAT_MAX = 8 + (D / INF_CU) * (ITER + 8) + 60;
  localparam int WATCHDOG = 400000;

`include "tb_hdc_fpga_top_body.svh"

  hdc_fpga_top #(
    .N_FEAT(N_FEAT), .D(D), .N_CLASS(NC), .LANES(LANES), .INF_CU(INF_CU), .SPT_CU(SPT_CU),
    .CORDIC_ITER(ITER)
  ) dut (.*);
endmodule
