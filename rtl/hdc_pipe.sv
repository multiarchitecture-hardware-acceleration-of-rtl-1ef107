// hdc_pipe: first-in first-out buffer that joins an encoding compute unit to
// the kernel that consumes its hypervector elements.
//
// It decouples the units from the consumer, which drains the units in turn:
// a unit whose element is not taken at once can go on encoding instead of
// stalling. Storage is a circular buffer of DEPTH entries with read and
// write pointers and an occupancy count; the head entry is always presented
// on the output, so a word written into an empty pipe is readable on the next
// clock. Push and pop may happen in the same clock.
//
// Interface: valid/ready on both sides, W-bit words. The reference design
// connects its kernels with pipes but does not give their depth; DEPTH is
// this design's choice.
module hdc_pipe #(
  parameter int unsigned W     = 33,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   count;
  logic          push, pop;

  assign in_ready  = (32'(count) < DEPTH);
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (pop)  rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);

endmodule
