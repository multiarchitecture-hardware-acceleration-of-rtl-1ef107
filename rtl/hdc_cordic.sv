// hdc_cordic: iterative CORDIC that returns sine and cosine of an angle.
//
// The encoder needs cos(x+b) and sin(x) for every hypervector dimension.
// This unit rotates the vector (K, 0) by the requested angle with one
// shift-and-add micro-rotation per clock, so it needs no multipliers and no
// table other than the ITER arc-tangent constants below.
//
// Angle: unsigned turns (2^32 = 2*pi). The angle is first folded into
// [-pi/2, pi/2) by flipping its top bit, which adds half a turn; the
// results are then negated to undo that fold.
//
// Interface: pulse `start` with `angle` while `busy` is low. `busy` rises on
// the next edge and `done` is high for one cycle, ITER+1 cycles after the cycle in which
// `start` is high, with `sin_o` and
// `cos_o` (signed Q1.30, 1.0 = 2^30) valid from then until the next start.
// The CORDIC method and the fixed-point formats are choices of this design;
// the reference design evaluates sin/cos in floating point.
module hdc_cordic #(
  parameter int unsigned ITER = 20   // micro-rotations, at most 24
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic        [31:0] angle,
  output logic               busy,
  output logic               done,
  output logic signed [31:0] sin_o,
  output logic signed [31:0] cos_o
);

  // atan(2^-i) / (2*pi) * 2^32, i = 0..23
  function automatic logic signed [31:0] atan_turns(input int unsigned i);
    case (i)
      0:  return 32'sd536870912;
      1:  return 32'sd316933406;
      2:  return 32'sd167458907;
      3:  return 32'sd85004756;
      4:  return 32'sd42667331;
      5:  return 32'sd21354465;
      6:  return 32'sd10679838;
      7:  return 32'sd5340245;
      8:  return 32'sd2670163;
      9:  return 32'sd1335087;
      10: return 32'sd667544;
      11: return 32'sd333772;
      12: return 32'sd166886;
      13: return 32'sd83443;
      14: return 32'sd41722;
      15: return 32'sd20861;
      16: return 32'sd10430;
      17: return 32'sd5215;
      18: return 32'sd2608;
      19: return 32'sd1304;
      20: return 32'sd652;
      21: return 32'sd326;
      22: return 32'sd163;
      default: return 32'sd81;
    endcase
  endfunction

  // CORDIC gain compensation, prod(1/sqrt(1+2^-2i)) in Q1.30
  localparam logic signed [31:0] K_Q30 = 32'sd652032874;

  logic signed [31:0] x, y, z;
  logic [4:0]         step;
  logic               flip;

  initial assert (ITER >= 1 && ITER <= 24) else $error("hdc_cordic: ITER out of range");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x     <= '0;
      y     <= '0;
      z     <= '0;
      step  <= '0;
      flip  <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        // fold into [-1/4, 1/4) turn: if outside, add half a turn
        flip <= angle[31] ^ angle[30];
        z    <= $signed({angle[30], angle[30:0]});
        x    <= K_Q30;
        y    <= '0;
        step <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (!z[31]) begin
          x <= x - (y >>> step);
          y <= y + (x >>> step);
          z <= z - atan_turns(32'(step));
        end else begin
          x <= x + (y >>> step);
          y <= y - (x >>> step);
          z <= z + atan_turns(32'(step));
        end
        if (32'(step) == ITER - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        step <= step + 5'd1;
      end
    end
  end

  // outputs follow x/y; negated when the angle was folded
  assign sin_o = flip ? -y : y;
  assign cos_o = flip ? -x : x;

endmodule
