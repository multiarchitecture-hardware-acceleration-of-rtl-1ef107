// tb_hdc_encoder_cu: self-checking test of one encoding compute unit.
//
// Loads random basis rows and phases, streams several random feature
// vectors and compares every element with cos(x+b)*sin(x) computed here in
// floating point from the exact integer dot product. The output is stalled
// at random to exercise back-pressure. NROWS is kept short so the trig stage,
// not the MAC, sets the pace and the MAC has to wait for it. The cycle count
// at full size is checked by the end-to-end test.
`timescale 1ns/1ps
module tb_hdc_encoder_cu;
  import hdc_pkg::*;
  localparam int N_FEAT = 12, DIMS = 6, LANES = 4, ITER = 20;
  localparam int NROWS = (N_FEAT + LANES - 1) / LANES;
  localparam int NVEC = 4;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bw_en, bias_en, f_valid, f_ready, h_valid, h_ready, h_last;
  logic [$clog2(DIMS)-1:0]  bw_dim, bias_dim;
  logic [$clog2(NROWS)-1:0] bw_row;
  word_t [LANES-1:0] bw_data, f_data;
  turns_t bias_data;
  word_t  h_data;

  hdc_encoder_cu #(.N_FEAT(N_FEAT), .DIMS(DIMS), .LANES(LANES), .CORDIC_ITER(ITER)) dut (.*);

  word_t  basis [DIMS][NROWS*LANES];
  turns_t bias  [DIMS];
  word_t  feat  [NVEC][NROWS*LANES];
  real    expect_h [NVEC][DIMS];
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real ref_h(input int v, input int d);
    logic signed [127:0] acc, prod;
    logic [31:0] t;
    real x, b;
    acc = 0;
    for (int k = 0; k < NROWS*LANES; k++) acc += 128'(basis[d][k]) * 128'(feat[v][k]);
    prod = acc * 128'sd683565276;
    t = prod[63:32];
    x = real'(t) / 4294967296.0 * 2.0 * PI;
    b = real'(bias[d]) / 4294967296.0 * 2.0 * PI;
    return $cos(x + b) * $sin(x);
  endfunction

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random output back-pressure
  always @(posedge clk) h_ready <= ($urandom % 4) != 0;

  // output checker
  int got_v = 0, got_d = 0, last_t = 0, max_gap = 0;
  always @(posedge clk) if (rst_n && h_valid && h_ready) begin
    real g, e;
    g = real'(h_data) / 65536.0;
    e = expect_h[got_v][got_d];
    checks++;
    if ((g - e > 0.0005) || (e - g > 0.0005)) begin
      failures++;
      $display("mismatch vec %0d dim %0d: got %f expected %f", got_v, got_d, g, e);
    end
    checks++;
    if (h_last != (got_d == DIMS-1)) begin failures++; $display("h_last wrong at dim %0d", got_d); end
    if (got_d == DIMS-1) begin got_d = 0; got_v++; end else got_d++;
  end

  initial begin
    bw_en = 0; bias_en = 0; f_valid = 0; bw_dim = 0; bw_row = 0; bw_data = '0;
    bias_dim = 0; bias_data = 0; f_data = '0;
    for (int d = 0; d < DIMS; d++) begin
      for (int k = 0; k < NROWS*LANES; k++) basis[d][k] = $signed(32'($urandom % 131072)) - 65536;
      bias[d] = $urandom;
    end
    for (int v = 0; v < NVEC; v++)
      for (int k = 0; k < NROWS*LANES; k++) feat[v][k] = 32'($urandom % 65536);
    // a vector of large values so the angle wraps many times
    for (int k = 0; k < NROWS*LANES; k++) feat[NVEC-1][k] = 32'sd1000000 + 32'($urandom % 65536);
    for (int v = 0; v < NVEC; v++) for (int d = 0; d < DIMS; d++) expect_h[v][d] = ref_h(v, d);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int d = 0; d < DIMS; d++) begin
      for (int r = 0; r < NROWS; r++) begin
        bw_en <= 1; bw_dim <= d[$clog2(DIMS)-1:0]; bw_row <= r[$clog2(NROWS)-1:0];
        for (int l = 0; l < LANES; l++) bw_data[l] <= basis[d][r*LANES+l];
        @(posedge clk);
      end
      bw_en <= 0; bias_en <= 1; bias_dim <= d[$clog2(DIMS)-1:0]; bias_data <= bias[d];
      @(posedge clk);
      bias_en <= 0;
    end
    for (int v = 0; v < NVEC; v++) begin
      for (int r = 0; r < NROWS; r++) begin
        f_valid <= 1;
        for (int l = 0; l < LANES; l++) f_data[l] <= feat[v][r*LANES+l];
        @(posedge clk);
        while (!f_ready) @(posedge clk);
      end
      f_valid <= 0;
      repeat ($urandom % 3) @(posedge clk);
    end
    wait (got_v == NVEC);
    repeat (5) @(posedge clk);
    checks++;
    if (got_v != NVEC) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
