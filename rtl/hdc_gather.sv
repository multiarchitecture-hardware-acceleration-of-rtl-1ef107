// hdc_gather: pieces the partial hypervectors of all encoding compute units
// together into one stream of elements tagged with their dimension.
//
// Unit c owns dimensions c*DPC .. c*DPC+DPC-1 and delivers them in order.
// The gather takes at most one element per clock, choosing round-robin
// among the units that have one waiting, so no unit waits behind another.
// A counter per unit gives each element its dimension; a unit whose count
// has reached DPC is not served again until the whole hypervector (NUM_CU*DPC
// elements) has passed, which keeps consecutive hypervectors apart. The
// element that completes a hypervector is flagged with o_last.
//
// Interface: one valid/ready pair per unit with shared-width data, one
// registered output stream (o_valid/o_ready, o_data, o_dim, o_last).
// Reassembling the hypervector follows the reference design; the
// round-robin order is this design's choice.
module hdc_gather
  import hdc_pkg::*;
#(
  parameter int unsigned NUM_CU = 25,
  parameter int unsigned DPC    = 80,     // dimensions per compute unit
  localparam int unsigned D     = NUM_CU * DPC,
  localparam int unsigned D_W   = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned C_W   = (NUM_CU > 1) ? $clog2(NUM_CU) : 1,
  localparam int unsigned K_W   = $clog2(DPC + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_CU-1:0]   i_valid,
  output logic [NUM_CU-1:0]   i_ready,
  input  word_t [NUM_CU-1:0]  i_data,
  output logic                o_valid,
  input  logic                o_ready,
  output word_t               o_data,
  output logic [D_W-1:0]      o_dim,
  output logic                o_last
);

  logic [K_W-1:0] cnt [NUM_CU];
  logic [C_W-1:0] ptr;
  logic [D_W-1:0] total;
  logic           pick_ok;
  logic [C_W-1:0] pick;
  logic           load;

  // round-robin choice of a unit that has an element and is not yet done
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int k = 0; k < NUM_CU; k++) begin
      int idx;
      idx = 32'(ptr) + k;
      if (idx >= NUM_CU) idx -= NUM_CU;
      if (!pick_ok && i_valid[idx] && (32'(cnt[idx]) < DPC)) begin
        pick_ok = 1'b1;
        pick    = C_W'(idx);
      end
    end
  end

  assign load = pick_ok && (!o_valid || o_ready);

  always_comb begin
    i_ready = '0;
    if (load) i_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CU; c++) cnt[c] <= '0;
      ptr     <= '0;
      total   <= '0;
      o_valid <= 1'b0;
      o_data  <= '0;
      o_dim   <= '0;
      o_last  <= 1'b0;
    end else begin
      if (o_valid && o_ready) o_valid <= 1'b0;
      if (load) begin
        o_valid <= 1'b1;
        o_data  <= i_data[pick];
        o_dim   <= D_W'(32'(pick) * DPC + 32'(cnt[pick]));
        o_last  <= (32'(total) == D - 1);
        ptr     <= (32'(pick) == NUM_CU - 1) ? '0 : pick + 1'b1;
        if (32'(total) == D - 1) begin
          total <= '0;
          for (int c = 0; c < NUM_CU; c++) cnt[c] <= '0;
        end else begin
          total     <= total + 1'b1;
          cnt[pick] <= cnt[pick] + 1'b1;
        end
      end
    end
  end

endmodule
