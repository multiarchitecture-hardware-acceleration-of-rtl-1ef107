// Shared body of the end-to-end testbenches of hdc_fpga_top. The including
// module defines the sizes (N_FEAT, D, NC, LANES, INF_CU, SPT_CU, ITER,
// NS_INF, NS_TR, EPOCHS, FULL) and instantiates the design as `dut`.
//
// It runs all three designs the way a host would:
//  1. loads one random basis and phase set into all three designs and, into
//     the inference design, NC class hypervectors made from the encodings
//     of NC template vectors (computed here in floating point);
//  2. inference: streams NS_INF vectors (templates in turn), holds the
//     prediction output for a while so the pipes fill and the compute units
//     stall, checks every prediction and the latency of the first vector;
//  3. single-pass training: clears, trains NS_TR labelled vectors, reads the
//     classes back and compares them with sums of the reference encodings;
//  4. NeuralHD: encodes the templates (checked against the reference),
//     retrains on them for EPOCHS passes against a model of the update rule,
//     compares counters and classes exactly, regenerates one dimension and
//     checks that only that dimension's encoding and class entries change.
// Each mechanism is counted; one that never happens counts as a failure.


  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic inf_bw_en, inf_bias_en, inf_cw_en, inf_f_valid, inf_f_ready, inf_p_valid, inf_p_ready;
  logic [$clog2(D)-1:0] inf_bw_dim, inf_bias_dim, inf_cw_dim;
  logic [((N_FEAT + LANES - 1) / LANES > 1 ? $clog2((N_FEAT + LANES - 1) / LANES) : 1)-1:0] inf_bw_row, spt_bw_row, nhd_bw_row;
  word_t [LANES-1:0] inf_bw_data, inf_f_data;
  turns_t inf_bias_data;
  logic [(NC > 1 ? $clog2(NC) : 1)-1:0] inf_cw_class, inf_p_class;
  word_t inf_cw_data;

  logic spt_bw_en, spt_bias_en, spt_f_valid, spt_f_ready, spt_l_valid, spt_l_ready;
  logic spt_cmd_clear, spt_cmd_read, spt_busy, spt_c_valid, spt_c_ready, spt_c_last;
  logic [$clog2(D)-1:0] spt_bw_dim, spt_bias_dim;
  word_t [LANES-1:0] spt_bw_data, spt_f_data;
  turns_t spt_bias_data;
  logic [(NC > 1 ? $clog2(NC) : 1)-1:0] spt_l_label;
  word_t spt_c_data;

  logic nhd_bw_en, nhd_bias_en, nhd_f_valid, nhd_f_ready, nhd_e_valid, nhd_e_ready, nhd_e_last;
  logic nhd_cmd_clear, nhd_cmd_read, nhd_stats_clear, nhd_fit_busy, nhd_cw_en;
  logic nhd_l_valid, nhd_l_ready, nhd_h_valid, nhd_h_ready, nhd_c_valid, nhd_c_ready, nhd_c_last;
  logic nhd_x_valid, nhd_x_ready, nhd_regen_busy;
  logic [$clog2(D)-1:0] nhd_bw_dim, nhd_bias_dim, nhd_cw_dim, nhd_x_dim;
  word_t [LANES-1:0] nhd_bw_data, nhd_f_data;
  turns_t nhd_bias_data;
  logic [(NC > 1 ? $clog2(NC) : 1)-1:0] nhd_cw_class, nhd_l_label;
  word_t nhd_cw_data, nhd_e_data, nhd_h_data, nhd_c_data;
  logic [31:0] nhd_n_samples, nhd_n_miss;

  localparam int NROWS = (N_FEAT + LANES - 1) / LANES;
  localparam int NF    = NROWS * LANES;
  localparam int INF_DPC = D / INF_CU;
  localparam int D_W = $clog2(D);
  localparam int L_W = (NC > 1) ? $clog2(NC) : 1;
  localparam int R_W = (NROWS > 1) ? $clog2(NROWS) : 1;
  localparam real PI = 3.14159265358979;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  word_t  basis [D][NF];
  turns_t bias  [D];
  word_t  feat  [NC][NF];
  real    href  [NC][D];
  word_t  hdut  [NC][D];

  // ---------------- mechanism counters ----------------
  int n_scatter_stall = 0, n_pipe_full = 0, n_gather_contend = 0, n_pred = 0;
  int n_spt_elems = 0, n_nhd_hit = 0, n_nhd_miss = 0, n_regen_rows = 0, n_zero = 0;
  int n_enc_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (inf_f_valid && !inf_f_ready) n_scatter_stall++;
    if (dut.u_infer.g_cu[0].u_pipe.in_valid && !dut.u_infer.g_cu[0].u_pipe.in_ready) n_pipe_full++;
    if ($countones(dut.u_infer.pp_valid) > 1) n_gather_contend++;
    if (dut.u_train.g_valid && dut.u_train.g_ready) n_spt_elems++;
    if (nhd_e_valid && !nhd_e_ready) n_enc_stall++;
    if (nhd_bw_en_int) n_regen_rows++;
    if (dut.u_neuralhd.z_en) n_zero++;
  end
  wire nhd_bw_en_int = dut.u_neuralhd.r_bw_en;

  function automatic real ref_h(input int s, input int d);
    logic signed [127:0] acc, prod;
    logic [31:0] t;
    real x, b;
    acc = 0;
    for (int k = 0; k < NF; k++) acc += 128'(basis[d][k]) * 128'(feat[s][k]);
    prod = acc * 128'sd683565276;
    t = prod[63:32];
    x = real'(t) / 4294967296.0 * 2.0 * PI;
    b = real'(bias[d]) / 4294967296.0 * 2.0 * PI;
    return $cos(x + b) * $sin(x);
  endfunction

  function automatic bit close(input word_t got, input real expect_v, input real tol);
    real g;
    g = real'(got) / 65536.0;
    return (g - expect_v <= tol) && (expect_v - g <= tol);
  endfunction

  // watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_all();
    for (int d = 0; d < D; d++) begin
      for (int r = 0; r < NROWS; r++) begin
        @(negedge clk);
        inf_bw_en = 1; spt_bw_en = 1; nhd_bw_en = 1;
        inf_bw_dim = D_W'(d); spt_bw_dim = D_W'(d); nhd_bw_dim = D_W'(d);
        inf_bw_row = R_W'(r); spt_bw_row = R_W'(r); nhd_bw_row = R_W'(r);
        for (int l = 0; l < LANES; l++) begin
          inf_bw_data[l] = basis[d][r*LANES+l];
        end
        spt_bw_data = inf_bw_data; nhd_bw_data = inf_bw_data;
      end
      @(negedge clk);
      inf_bw_en = 0; spt_bw_en = 0; nhd_bw_en = 0;
      inf_bias_en = 1; spt_bias_en = 1; nhd_bias_en = 1;
      inf_bias_dim = D_W'(d); spt_bias_dim = D_W'(d); nhd_bias_dim = D_W'(d);
      inf_bias_data = bias[d]; spt_bias_data = bias[d]; nhd_bias_data = bias[d];
    end
    @(negedge clk);
    inf_bias_en = 0; spt_bias_en = 0; nhd_bias_en = 0;
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) begin
      inf_cw_en = 1; inf_cw_class = L_W'(j); inf_cw_dim = D_W'(d);
      inf_cw_data = word_t'($rtoi(href[j][d] * 65536.0));
      @(negedge clk);
    end
    inf_cw_en = 0;
  endtask

  // ---------------- inference ----------------
  int inf_t0 = -1, inf_t1 = -1;
  task automatic inf_send();
    for (int s = 0; s < NS_INF; s++)
      for (int r = 0; r < NROWS; r++) begin
        @(negedge clk);
        inf_f_valid = 1;
        for (int l = 0; l < LANES; l++) inf_f_data[l] = feat[s % NC][r*LANES+l];
        @(posedge clk);
        while (!inf_f_ready) @(posedge clk);
        if (s == 0 && r == 0) inf_t0 = cycle;
      end
    @(negedge clk) inf_f_valid = 0;
  endtask

  task automatic inf_recv();
    for (int s = 0; s < NS_INF; s++) begin
      @(negedge clk);
      inf_p_ready = 1;
      @(posedge clk);
      while (!inf_p_valid) @(posedge clk);
      if (s == 0) inf_t1 = cycle;
      n_pred++;
      checks++;
      if (int'(inf_p_class) != s % NC) begin
        failures++; $display("inference %0d: class %0d expected %0d", s, inf_p_class, s % NC);
      end
      @(negedge clk) inf_p_ready = 0;
      // hold the output so the pipes fill behind the classifier
      if (s == 0) repeat (HOLD) @(negedge clk);
    end
  endtask

  // ---------------- single-pass training ----------------
  task automatic spt_run();
    real sum [NC][D];
    int cnt [NC];
    for (int j = 0; j < NC; j++) begin cnt[j] = 0; for (int d = 0; d < D; d++) sum[j][d] = 0.0; end
    @(negedge clk);
    while (spt_busy) @(negedge clk);
    spt_cmd_clear = 1; @(negedge clk) spt_cmd_clear = 0;
    fork
      for (int s = 0; s < NS_TR; s++) begin
        @(negedge clk);
        spt_l_valid = 1; spt_l_label = L_W'((s * 7 + 1) % NC);
        @(posedge clk);
        while (!spt_l_ready) @(posedge clk);
        @(negedge clk) spt_l_valid = 0;
      end
      for (int s = 0; s < NS_TR; s++)
        for (int r = 0; r < NROWS; r++) begin
          @(negedge clk);
          spt_f_valid = 1;
          for (int l = 0; l < LANES; l++) spt_f_data[l] = feat[s % NC][r*LANES+l];
          @(posedge clk);
          while (!spt_f_ready) @(posedge clk);
          @(negedge clk) spt_f_valid = 0;
        end
    join
    for (int s = 0; s < NS_TR; s++) begin
      cnt[(s * 7 + 1) % NC]++;
      for (int d = 0; d < D; d++) sum[(s * 7 + 1) % NC][d] += href[s % NC][d];
    end
    wait (n_spt_elems == NS_TR * D);
    @(negedge clk);
    while (spt_busy) @(negedge clk);
    spt_cmd_read = 1; @(negedge clk) spt_cmd_read = 0;
    spt_c_ready = 1;
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) begin
      @(posedge clk);
      while (!spt_c_valid) @(posedge clk);
      checks++;
      if (!close(spt_c_data, sum[j][d], 0.0005 * (cnt[j] + 1))) begin
        failures++; $display("spt class %0d dim %0d: %f expected %f", j, d, real'(spt_c_data) / 65536.0, sum[j][d]);
      end
    end
    @(negedge clk) spt_c_ready = 0;
  endtask

  // ---------------- NeuralHD ----------------
  task automatic nhd_encode(input int s, output word_t h [D]);
    int got;
    got = 0;
    fork
      for (int r = 0; r < NROWS; r++) begin
        @(negedge clk);
        nhd_f_valid = 1;
        for (int l = 0; l < LANES; l++) nhd_f_data[l] = feat[s][r*LANES+l];
        @(posedge clk);
        while (!nhd_f_ready) @(posedge clk);
        @(negedge clk) nhd_f_valid = 0;
      end
      while (got < D) begin
        @(negedge clk);
        nhd_e_ready = ($urandom % 4 != 0);
        @(posedge clk);
        if (nhd_e_valid && nhd_e_ready) begin
          h[got] = nhd_e_data;
          checks++;
          if (nhd_e_last != (got == D - 1)) begin failures++; $display("e_last wrong at %0d", got); end
          got++;
        end
      end
    join
    @(negedge clk) nhd_e_ready = 0;
  endtask

  longint mc [NC][D];
  int model_miss = 0;
  function automatic longint sat(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  task automatic nhd_fit_sample(input int s, input int lab);
    longint sc, bs, ah;
    int best;
    @(negedge clk);
    while (nhd_fit_busy) @(negedge clk);
    nhd_l_valid = 1; nhd_l_label = L_W'(lab);
    @(posedge clk);
    while (!nhd_l_ready) @(posedge clk);
    @(negedge clk) nhd_l_valid = 0;
    for (int d = 0; d < D; d++) begin
      nhd_h_valid = 1; nhd_h_data = hdut[s][d];
      @(posedge clk);
      while (!nhd_h_ready) @(posedge clk);
      @(negedge clk);
    end
    nhd_h_valid = 0;
    best = 0; bs = 0;
    for (int j = 0; j < NC; j++) begin
      sc = 0;
      for (int d = 0; d < D; d++) sc += longint'(hdut[s][d]) * mc[j][d];
      if (j == 0 || sc > bs) begin bs = sc; best = j; end
    end
    if (best != lab) begin
      model_miss++; n_nhd_miss++;
      for (int d = 0; d < D; d++) begin
        ah = (64'sd2425 * longint'(hdut[s][d])) >>> 16;
        mc[lab][d]  = sat(mc[lab][d] + ah);
        mc[best][d] = sat(mc[best][d] - ah);
      end
    end else n_nhd_hit++;
  endtask

  task automatic nhd_readback();
    @(negedge clk);
    while (nhd_fit_busy) @(negedge clk);
    nhd_cmd_read = 1; @(negedge clk) nhd_cmd_read = 0;
    nhd_c_ready = 1;
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) begin
      @(posedge clk);
      while (!nhd_c_valid) @(posedge clk);
      checks++;
      if (longint'(nhd_c_data) != mc[j][d]) begin
        failures++; $display("nhd class %0d dim %0d: %0d expected %0d", j, d, nhd_c_data, mc[j][d]);
      end
    end
    @(negedge clk) nhd_c_ready = 0;
  endtask

  task automatic nhd_run();
    word_t h2 [D];
    int rdim;
    for (int s = 0; s < NC; s++) begin
      nhd_encode(s, hdut[s]);
      for (int d = 0; d < D; d++) begin
        checks++;
        if (!close(hdut[s][d], href[s][d], 0.0005)) begin
          failures++; $display("nhd encode %0d dim %0d: %f expected %f", s, d, real'(hdut[s][d]) / 65536.0, href[s][d]);
        end
      end
    end
    @(negedge clk);
    nhd_cmd_clear = 1; @(negedge clk) nhd_cmd_clear = 0;
    @(negedge clk);
    while (nhd_fit_busy) @(negedge clk);
    nhd_stats_clear = 1; @(negedge clk) nhd_stats_clear = 0;
    for (int j = 0; j < NC; j++) for (int d = 0; d < D; d++) mc[j][d] = 0;
    for (int e = 0; e < EPOCHS; e++)
      for (int s = 0; s < NC; s++) nhd_fit_sample(s, s);
    @(negedge clk);
    while (nhd_fit_busy) @(negedge clk);
    checks++;
    if (nhd_n_samples != 32'(EPOCHS * NC) || nhd_n_miss != 32'(model_miss)) begin
      failures++; $display("nhd counters %0d/%0d expected %0d/%0d", nhd_n_samples, nhd_n_miss, EPOCHS * NC, model_miss);
    end
    nhd_readback();
    // drop and regenerate one dimension
    rdim = D / 3;
    @(negedge clk);
    nhd_x_valid = 1; nhd_x_dim = D_W'(rdim);
    @(posedge clk);
    while (!nhd_x_ready) @(posedge clk);
    @(negedge clk) nhd_x_valid = 0;
    @(negedge clk);
    while (nhd_regen_busy) @(negedge clk);
    for (int j = 0; j < NC; j++) mc[j][rdim] = 0;
    nhd_readback();
    nhd_encode(0, h2);
    for (int d = 0; d < D; d++) begin
      checks++;
      if ((d == rdim) == (h2[d] == hdut[0][d])) begin
        failures++; $display("after regeneration dim %0d: %0d before %0d", d, h2[d], hdut[0][d]);
      end
    end
  endtask

  // ---------------- main ----------------
  initial begin
    {inf_bw_en, inf_bias_en, inf_cw_en, inf_f_valid, inf_p_ready} = '0;
    {spt_bw_en, spt_bias_en, spt_f_valid, spt_l_valid, spt_cmd_clear, spt_cmd_read, spt_c_ready} = '0;
    {nhd_bw_en, nhd_bias_en, nhd_f_valid, nhd_e_ready, nhd_cmd_clear, nhd_cmd_read, nhd_stats_clear} = '0;
    {nhd_cw_en, nhd_l_valid, nhd_h_valid, nhd_c_ready, nhd_x_valid} = '0;
    inf_bw_dim = 0; inf_bw_row = 0; inf_bw_data = '0; inf_bias_dim = 0; inf_bias_data = 0;
    inf_cw_class = 0; inf_cw_dim = 0; inf_cw_data = 0; inf_f_data = '0;
    spt_bw_dim = 0; spt_bw_row = 0; spt_bw_data = '0; spt_bias_dim = 0; spt_bias_data = 0;
    spt_f_data = '0; spt_l_label = 0;
    nhd_bw_dim = 0; nhd_bw_row = 0; nhd_bw_data = '0; nhd_bias_dim = 0; nhd_bias_data = 0;
    nhd_f_data = '0; nhd_cw_class = 0; nhd_cw_dim = 0; nhd_cw_data = 0; nhd_l_label = 0;
    nhd_h_data = 0; nhd_x_dim = 0;
    for (int d = 0; d < D; d++) begin
      for (int k = 0; k < NF; k++) basis[d][k] = (k < N_FEAT) ? $signed(32'($urandom % 131072)) - 65536 : 0;
      bias[d] = $urandom;
    end
    for (int s = 0; s < NC; s++)
      for (int k = 0; k < NF; k++) feat[s][k] = (k < N_FEAT) ? 32'($urandom % 65536) : 0;
    for (int s = 0; s < NC; s++) for (int d = 0; d < D; d++) href[s][d] = ref_h(s, d);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_all();
    fork
      inf_send();
      inf_recv();
    join
    checks++;
    $display("first inference: %0d clocks from first feature row to prediction", inf_t1 - inf_t0);
    if (inf_t1 - inf_t0 < INF_DPC * NROWS || inf_t1 - inf_t0 > INF_LAT_MAX) begin
      failures++; $display("latency %0d outside [%0d, %0d]", inf_t1 - inf_t0, INF_DPC * NROWS, INF_LAT_MAX);
    end
    spt_run();
    nhd_run();
    $display("mechanisms: scatter_stall=%0d pipe_full=%0d gather_contention=%0d predictions=%0d spt_elements=%0d nhd_hits=%0d nhd_misses=%0d enc_out_stall=%0d regen_rows=%0d class_zeroing=%0d",
             n_scatter_stall, n_pipe_full, n_gather_contend, n_pred, n_spt_elems, n_nhd_hit, n_nhd_miss,
             n_enc_stall, n_regen_rows, n_zero);
    checks++; if (n_scatter_stall == 0)  begin failures++; $display("scatter never stalled"); end
    checks++; if (n_pipe_full == 0)      begin failures++; $display("pipe never full"); end
    checks++; if (n_gather_contend == 0) begin failures++; $display("gather never had contention"); end
    checks++; if (n_nhd_hit == 0)        begin failures++; $display("retraining never hit"); end
    checks++; if (n_nhd_miss == 0)       begin failures++; $display("retraining never missed"); end
    checks++; if (n_enc_stall == 0)      begin failures++; $display("encoder output never stalled"); end
    checks++; if (n_regen_rows != NROWS) begin failures++; $display("regeneration wrote %0d rows", n_regen_rows); end
    checks++; if (n_zero != 1)           begin failures++; $display("class zeroing %0d times", n_zero); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
