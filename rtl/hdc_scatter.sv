// hdc_scatter: hands every feature row arriving from the host to all
// encoding compute units.
//
// Each compute unit encodes its own slice of the hypervector and therefore
// needs the whole feature vector, so the scatter stage is a one-to-NUM_CU
// broadcast of the input stream. It is an eager fork: a row is offered to
// every unit at once, each unit takes it when it is ready, a per-unit
// "taken" flag stops a unit from taking the same row twice, and the input is
// acknowledged in the cycle the last unit takes it. No row is stored here,
// so the fork adds no latency. m_data is the input row itself, wired
// through unchanged: the work of this block is the valid/ready fork, and a
// lint tool may list m_data as a plain feed-through for that reason.
//
// Interface: s_* is the input valid/ready stream, m_valid/m_ready one pair
// per unit, m_data shared. Broadcasting the rows follows the reference
// design's "scatter" stage; the handshake is this design's choice.
module hdc_scatter
  import hdc_pkg::*;
#(
  parameter int unsigned NUM_CU = 25,
  parameter int unsigned LANES  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_valid,
  output logic                 s_ready,
  input  word_t [LANES-1:0]    s_data,
  output logic [NUM_CU-1:0]    m_valid,
  input  logic [NUM_CU-1:0]    m_ready,
  output word_t [LANES-1:0]    m_data
);

  logic [NUM_CU-1:0] taken;

  assign m_data  = s_data;
  assign m_valid = {NUM_CU{s_valid}} & ~taken;
  assign s_ready = &(taken | m_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 taken <= '0;
    else if (s_valid && s_ready) taken <= '0;
    else                         taken <= taken | (m_valid & m_ready);
  end

  // a row offered on the input must stay put until it is acknowledged
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_valid && !s_ready |=> s_valid && $stable(s_data));

endmodule
